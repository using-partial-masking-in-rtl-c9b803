// tb_xchain_sweep: the X-chain count experiment, on synthetic responses.
//
// Five complete designs run side by side with 4, 8, 12, 18 and 36 X-chains. Each gets the same
// kind of response (per-site X rates, about 2.9% X's, the most X-prone sites stitched into the
// X-chains, 1% D's) and runs 30 test vectors end to end, with every X-canceled combination
// checked. The table printed at the end gives, per X-chain count: the share of X's that fall in
// X-chains, the share masked, and the control bits spent (one mask bit per shift cycle plus
// q x M selection bits per signature).
// Checked beyond each run's own checks: the share of X's in X-chains never falls as X-chains
// are added, and the share masked never exceeds the share in X-chains. The counts are those of
// this synthetic workload, not of any particular circuit.
module tb_xchain_sweep;
  localparam int NCFG = 5;
  localparam int unsigned NXCS [NCFG] = '{4, 8, 12, 18, 36};
  localparam int unsigned NV = 30;

  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], masked_x [NCFG], leaked_x [NCFG], regular_x [NCFG];
  int   slices [NCFG], sigs [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    xcm_e2e_run #(.NXC(NXCS[g]), .PROFILE(1'b1), .N_VEC(NV), .SEED(32'h1357_9bdf + g)) u_run (
      .done(done[g]), .checks(checks[g]), .failures(failures[g]), .n_masked_x(masked_x[g]),
      .n_leaked_x(leaked_x[g]), .n_regular_x(regular_x[g]), .n_slices(slices[g]),
      .n_sigs(sigs[g])
    );
  end

  initial begin : watchdog
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    int tc, tf;
    real in_x [NCFG], msk [NCFG];
    for (int g = 0; g < NCFG; g++) wait (done[g] === 1'b1);
    tc = 0; tf = 0;
    $display("X-chains  X's in X-chains  X's masked  signatures  control bits");
    for (int g = 0; g < NCFG; g++) begin
      int tot, bits;
      tot  = masked_x[g] + leaked_x[g] + regular_x[g];
      bits = slices[g] + sigs[g] * int'(xcm_pkg::Q_COMB * xcm_pkg::MISR_W);
      tc += checks[g]; tf += failures[g];
      in_x[g] = 100.0 * real'(masked_x[g] + leaked_x[g]) / real'(tot);
      msk[g]  = 100.0 * real'(masked_x[g]) / real'(tot);
      $display("%8d  %14.1f%%  %9.1f%%  %10d  %12d", NXCS[g], in_x[g], msk[g], sigs[g], bits);
      tc++;
      if (msk[g] > in_x[g]) begin tf++; $display("FAIL: more masked than captured"); end
      if (g > 0) begin
        tc++;
        if (in_x[g] < in_x[g-1]) begin tf++; $display("FAIL: X-chain share fell"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
