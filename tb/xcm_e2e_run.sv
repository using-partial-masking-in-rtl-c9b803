// xcm_e2e_run: reusable end-to-end run of the X-canceling MISR with partially masked X-chains.
//
// The harness plays the tester and the off-line software around one xcanceling_misr_top:
//  * Test-vector responses are generated cell by cell. With PROFILE = 0 X-chain cells capture
//    X's with probability 40% and regular cells with 0.4%. With PROFILE = 1 every scan-cell
//    site has its own X rate (6% of sites 40%, 10% of sites 4%, the rest 0.1%, about 2.9% X's
//    overall) and the NXC*L most X-prone sites are stitched into the X-chains, the rest into
//    the regular chains, as the X-chain construction prescribes. 1% of known cells are D's.
//  * The X-chain mask bit is 0 except in slices where an X-chain cell is a D.
//  * A symbolic model tracks which X's every MISR stage depends on and its value with all X's
//    at 0. Vectors are added to a signature while its X's stay at or below M - q.
//  * Gauss-Jordan elimination gives the X-free combinations; q random mixes of them are loaded
//    into the selection register and xc_bit must equal the prediction with X = 0, although the
//    DUT is fed random X values. The X-free MISR is compared with a reference.
//  * From signature ERR_SIG on, one D value per signature is flipped in what the DUT receives;
//    the combinations must differ from the prediction exactly as the model says, and the error
//    must be seen in at least one signature (each escapes with probability 2^-q).
// After N_VEC vectors the last signature is read out and 'done' rises; the ports then hold the
// check counts and the statistics (X's masked, leaked, from regular chains, in X-chains, scan
// slices, signatures). Each mechanism that never occurs counts as a failure.
// The DUT is instantiated with its default parameters when NXC equals the default X-chain count.
module xcm_e2e_run #(
  parameter int unsigned NXC     = xcm_pkg::N_XCHAINS,
  parameter bit          PROFILE = 1'b0,
  parameter int unsigned N_VEC   = 55,
  parameter int unsigned ERR_SIG = 1,
  parameter int unsigned SEED    = 32'h2468_ace0
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_masked_x,
  output int   n_leaked_x,
  output int   n_regular_x,
  output int   n_slices,
  output int   n_sigs
);
  import xcm_pkg::*;
  localparam int unsigned M = MISR_W, N = N_CHAINS, NX = NXC, CH = SEL_CH;
  localparam int unsigned Q = Q_COMB, XW = XFREE_W;
  localparam int unsigned L = 24;          // cells per chain (slices per test vector)

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  scan_out;
  logic          xmask_n, misr_clear, misr_en, sel_clear, sel_shift, xfree_clear, xfree_en;
  logic [CH-1:0] sel_din;
  logic          xc_bit;
  logic [XW-1:0] xfree_sig, xfree_ref, xtaps;
  always #5 clk = ~clk;

  if (NXC == xcm_pkg::N_XCHAINS) begin : g_dut_default
    xcanceling_misr_top u_dut (
      .clk, .rst_n, .scan_out, .xmask_n, .misr_clear, .misr_en, .sel_clear, .sel_shift,
      .sel_din, .xc_bit, .xfree_clear, .xfree_en, .xfree_sig
    );
  end else begin : g_dut_sized
    xcanceling_misr_top #(.N_XCHAINS(NXC)) u_dut (
      .clk, .rst_n, .scan_out, .xmask_n, .misr_clear, .misr_en, .sel_clear, .sel_shift,
      .sel_din, .xc_bit, .xfree_clear, .xfree_en, .xfree_sig
    );
  end

  int n_unmasked_slices = 0;
  int n_multi_vec_sigs = 0, n_combs = 0, n_err_detected = 0, n_err_injected = 0, n_vectors = 0;
  int unsigned pmap [L][N];   // X probability of each cell site, per mille

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  // deterministic generator (xorshift32)
  int unsigned rs = SEED;
  function automatic int unsigned rnd();
    rs ^= rs << 13; rs ^= rs >> 17; rs ^= rs << 5;
    return rs;
  endfunction

  // one test vector's response
  logic [N-1:0] cell_x [L];   // cell captured an X
  logic [N-1:0] cell_d [L];   // cell holds a fault effect
  logic [N-1:0] cell_v [L];   // known value (ignored for X cells)

  // symbolic MISR model
  logic [M-1:0] dep [M];      // dep[i][k]: stage i depends on X number k
  logic [M-1:0] kv;           // stage values with every X = 0
  logic [M-1:0] kv_err;       // the same with the injected error applied
  int           nx_sig;       // X's in the current signature

  function automatic int unsigned ps_mix(int unsigned v);
    int unsigned x = v;
    x ^= x >> 15; x *= 32'h2C1B3C6D;
    x ^= x >> 12; x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  // chains feeding output j of a phase shifter with n inputs (hash taps, see phase_shifter)
  function automatic int unsigned ps_tap_n(int unsigned j, int unsigned k, int unsigned n);
    int unsigned t [3];
    t[0] = j % n;
    t[1] = ps_mix(j * 32'h9E3779B1 + 32'h85EBCA77 + 1) % n;
    t[2] = ps_mix(j * 32'h9E3779B1 + 2 * 32'h85EBCA77 + 1) % n;
    while (t[1] == t[0]) t[1] = (t[1] + 1) % n;
    while (t[2] == t[0] || t[2] == t[1]) t[2] = (t[2] + 1) % n;
    return t[k];
  endfunction

  function automatic int unsigned ps_tap(int unsigned j, int unsigned k);
    return ps_tap_n(j, k, N);
  endfunction

  function automatic logic [M-1:0] misr_taps();
    logic [M-1:0] t = '0;
    t[253] = 1'b1; t[250] = 1'b1; t[245] = 1'b1; t[M-1] = 1'b1;
    return t;
  endfunction

  task automatic gen_vector();
    for (int s = 0; s < L; s++) begin
      for (int c = 0; c < N; c++) begin
        int unsigned r = rnd() % 1000;
        bit is_x = (r < pmap[s][c]);
        cell_x[s][c] = is_x;
        cell_d[s][c] = !is_x && (rnd() % 100 == 0);
        cell_v[s][c] = rnd() % 2;
      end
    end
  endtask

  // X rate of every site; with PROFILE the most X-prone sites form the X-chains
  task automatic build_profile();
    int unsigned plist [L*N];
    int unsigned nh = (L * N * 6) / 100, nw = (L * N * 10) / 100;
    int k = 0;
    for (int i = 0; i < int'(L * N); i++)
      plist[i] = (i < int'(nh)) ? 400 : (i < int'(nh + nw)) ? 40 : 1;
    // regular-chain sites get the remaining rates in random order
    for (int i = int'(L * N) - 1; i > int'(NX * L); i--) begin
      int j = int'(NX * L) + int'(rnd() % (i - int'(NX * L) + 1));
      int unsigned t = plist[i];
      plist[i] = plist[j]; plist[j] = t;
    end
    for (int c = 0; c < int'(NX); c++)
      for (int s = 0; s < int'(L); s++) begin pmap[s][c] = plist[k]; k++; end
    for (int c = int'(NX); c < int'(N); c++)
      for (int s = 0; s < int'(L); s++) begin pmap[s][c] = plist[k]; k++; end
  endtask

  // X's of the vector that would reach the MISR
  function automatic int vec_x_in();
    int n = 0;
    for (int s = 0; s < L; s++) begin
      bit unmask = |cell_d[s][NX-1:0];
      for (int c = 0; c < N; c++)
        if (cell_x[s][c] && (c >= NX || unmask)) n++;
    end
    return n;
  endfunction

  // shift one vector into DUT and model; flip_s/flip_c: cell whose value the DUT gets inverted
  task automatic shift_vector(input int flip_s, input int flip_c);
    for (int s = 0; s < L; s++) begin
      logic [M-1:0] in_dep [M];
      logic [M-1:0] in_kv, in_kv_err, nd0;
      logic [M-1:0] cdep [N];
      logic [N-1:0] ckv, ckv_err, drive;
      bit unmask = |cell_d[s][NX-1:0];
      if (unmask) n_unmasked_slices++;
      for (int c = 0; c < N; c++) begin
        cdep[c] = '0; ckv[c] = 1'b0;
        drive[c] = cell_x[s][c] ? 1'(rnd()) : cell_v[s][c];
        if (s == flip_s && c == flip_c) drive[c] = ~drive[c];
        if (c < NX && !unmask) begin
          if (cell_x[s][c]) n_masked_x++;
        end else if (cell_x[s][c]) begin
          cdep[c][nx_sig] = 1'b1;
          nx_sig++;
          if (c < NX) n_leaked_x++; else n_regular_x++;
        end else begin
          ckv[c] = cell_v[s][c];
        end
      end
      ckv_err = ckv;
      if (s == flip_s) ckv_err[flip_c] = ~ckv_err[flip_c];
      for (int j = 0; j < M; j++) begin
        in_dep[j] = '0; in_kv[j] = 1'b0; in_kv_err[j] = 1'b0;
        for (int k = 0; k < 3; k++) begin
          in_dep[j]    ^= cdep[ps_tap(j, k)];
          in_kv[j]     ^= ckv[ps_tap(j, k)];
          in_kv_err[j] ^= ckv_err[ps_tap(j, k)];
        end
      end
      kv_err = (kv_err >> 1) ^ in_kv_err ^ (kv_err[0] ? misr_taps() : '0);
      nd0 = dep[0];
      kv = (kv >> 1) ^ in_kv ^ (kv[0] ? misr_taps() : '0);
      for (int i = 0; i < M; i++) begin
        logic [M-1:0] nxt = in_dep[i] ^ (misr_taps()[i] ? nd0 : '0);
        if (i < M - 1) nxt ^= dep[i+1];
        dep[i] = nxt;
      end
      @(negedge clk);
      scan_out = drive; xmask_n = unmask; misr_en = 1'b1;
      @(posedge clk);
    end
    @(negedge clk); misr_en = 1'b0;
  endtask

  // Gauss-Jordan elimination: up to Q combinations of stages with all X's canceled
  task automatic find_combs(output logic [M-1:0] comb [Q], output int found);
    logic [M-1:0] row [M];
    logic [M-1:0] who [M];
    int rank = 0;
    for (int i = 0; i < M; i++) begin row[i] = dep[i]; who[i] = '0; who[i][i] = 1'b1; end
    for (int col = 0; col < nx_sig; col++) begin
      int p = -1;
      for (int i = rank; i < M; i++) if (row[i][col]) begin p = i; break; end
      if (p < 0) continue;
      begin
        logic [M-1:0] tr = row[p], tw = who[p];
        row[p] = row[rank]; who[p] = who[rank]; row[rank] = tr; who[rank] = tw;
      end
      for (int i = 0; i < M; i++)
        if (i != rank && row[i][col]) begin row[i] ^= row[rank]; who[i] ^= who[rank]; end
      rank++;
    end
    // each checked combination is a random non-zero mix of the X-free basis rows, which is
    // what gives every combination an even chance of seeing an error
    found = 0;
    if (M - rank >= Q) begin
      for (int q = 0; q < int'(Q); q++) begin
        logic [M-1:0] c;
        do begin
          c = '0;
          for (int i = rank; i < M; i++) if (rnd() % 2 == 1) c ^= who[i];
        end while (c == '0);
        comb[q] = c;
        found++;
      end
    end
  endtask

  task automatic process_signature(input bit expect_error);
    logic [M-1:0] comb [Q];
    int found, mism;
    logic pred;
    find_combs(comb, found);
    if (expect_error) check(kv_err != kv, "injected error has no effect on the signature");
    check(found == int'(Q), $sformatf("only %0d combinations for %0d X's", found, nx_sig));
    mism = 0;
    for (int q = 0; q < found; q++) begin
      logic [M-1:0] xsum = '0;
      for (int i = 0; i < M; i++) if (comb[q][i]) xsum ^= dep[i];
      check(xsum == '0, "combination still depends on an X (model)");
      @(negedge clk); sel_clear = 1'b1; @(negedge clk); sel_clear = 1'b0;
      for (int k = 0; k < int'(M / CH); k++) begin
        sel_shift = 1'b1; sel_din = comb[q][k*CH +: CH];
        @(negedge clk);
      end
      sel_shift = 1'b0;
      pred = ^(comb[q] & kv);
      if (expect_error) begin
        // the DUT must show exactly the effect the model predicts for the flipped D
        check(xc_bit == ^(comb[q] & kv_err), $sformatf("combination %0d with error", q));
        if (xc_bit != pred) mism++;
      end else begin
        check(xc_bit == pred, $sformatf("X-canceled combination %0d", q));
      end
      n_combs++;
      xfree_en = 1'b1; @(negedge clk); xfree_en = 1'b0;
      xfree_ref = ((xfree_ref >> 1) ^ (xfree_ref[0] ? xtaps : '0)) ^ {xc_bit, {(XW-1){1'b0}}};
      check(xfree_sig == xfree_ref, "X-free MISR");
    end
    if (expect_error) begin
      n_err_injected++;
      if (mism > 0) n_err_detected++;
    end
    misr_clear = 1'b1; @(negedge clk); misr_clear = 1'b0;
  endtask

  initial begin
    int vec_in_sig, flip_s, flip_c;
    bit pending, more;
    done = 1'b0; checks = 0; failures = 0; n_masked_x = 0; n_leaked_x = 0; n_regular_x = 0;
    n_slices = 0; n_sigs = 0;
    scan_out = '0; xmask_n = 1'b0; misr_clear = 1'b0; misr_en = 1'b0; sel_clear = 1'b0;
    sel_shift = 1'b0; sel_din = '0; xfree_clear = 1'b0; xfree_en = 1'b0;
    xtaps = '0; xtaps[21] = 1'b1; xtaps[1] = 1'b1; xtaps[0] = 1'b1; xtaps[XW-1] = 1'b1;
    xfree_ref = '0;
    if (PROFILE) build_profile();
    else
      for (int s = 0; s < int'(L); s++)
        for (int c = 0; c < int'(N); c++) pmap[s][c] = (c < int'(NX)) ? 400 : 4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pending = 1'b0;
    more = 1'b1;
    while (more) begin
      bit err_sig;
      err_sig = (n_sigs >= int'(ERR_SIG));
      for (int i = 0; i < M; i++) dep[i] = '0;
      kv = '0; kv_err = '0; nx_sig = 0; vec_in_sig = 0; flip_s = -1; flip_c = -1;
      forever begin
        if (!pending) begin
          if (n_vectors == int'(N_VEC)) begin more = 1'b0; break; end
          gen_vector(); n_vectors++;
        end
        pending = 1'b0;
        if (nx_sig + vec_x_in() > int'(M - Q)) begin
          if (vec_in_sig == 0) begin
            check(1'b0, "one vector holds more X's than a signature can take");
            more = 1'b0;
          end else begin
            pending = 1'b1;
          end
          break;
        end
        if (err_sig && flip_s < 0) begin
          // inject an error on the first D cell of this vector
          for (int s = 0; s < L && flip_s < 0; s++)
            for (int c = 0; c < N; c++) if (cell_d[s][c]) begin flip_s = s; flip_c = c; break; end
          shift_vector(flip_s, flip_c);
        end else begin
          shift_vector(-1, -1);
        end
        n_slices += L;
        vec_in_sig++;
      end
      if (vec_in_sig == 0) break;
      if (vec_in_sig > 1) n_multi_vec_sigs++;
      process_signature(err_sig && flip_s >= 0);
      n_sigs++;
    end
    $display("[%0d X-chains] %0d vectors, %0d signatures, masked X %0d, leaked X %0d, regular-chain X %0d, unmasked slices %0d, combinations %0d, errors detected %0d of %0d",
             NX, n_vectors, n_sigs, n_masked_x, n_leaked_x, n_regular_x, n_unmasked_slices,
             n_combs, n_err_detected, n_err_injected);
    check(n_masked_x > 0, "no X was masked");
    check(n_leaked_x > 0, "no X leaked");
    check(n_regular_x > 0, "no X in regular chains");
    check(n_multi_vec_sigs > 0, "no signature spanned several vectors");
    check(n_combs == n_sigs * int'(Q), "combination count");
    // each injected error escapes q combinations with probability 2^-q
    check(n_err_injected > 0 && n_err_detected > 0, "error detection never exercised");
    done = 1'b1;
  end
endmodule
