// tb_phase_shifter: checks the phase-shifter XOR network at its default size (128 chains to
// 256 MISR inputs) and at a small size (4 chains to 6 outputs). For every single-chain input
// the outputs that toggle must be exactly those the tap formula gives, every chain must reach
// a MISR input and every output must depend on exactly three chains; random slices are then
// compared with a reference computed from the formula. A final check guards against the
// translation aliasing the hashed taps exist to avoid.
module tb_phase_shifter;
  localparam int unsigned NI = 128, NO = 256;
  localparam int unsigned SI = 4,   SO = 6;
  logic [NI-1:0] a_in;
  logic [NO-1:0] a_out, a_ref;
  logic [SI-1:0] b_in;
  logic [SO-1:0] b_out, b_ref;
  int checks = 0, failures = 0;

  phase_shifter #(.N_IN(NI), .N_OUT(NO)) u_a (.chain_in(a_in), .misr_in(a_out));
  phase_shifter #(.N_IN(SI), .N_OUT(SO)) u_b (.chain_in(b_in), .misr_in(b_out));

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

  function automatic logic [NO-1:0] ref_a(logic [NI-1:0] v);
    logic [NO-1:0] r;
    for (int j = 0; j < NO; j++)
      r[j] = v[ps_tap_n(j, 0, NI)] ^ v[ps_tap_n(j, 1, NI)] ^ v[ps_tap_n(j, 2, NI)];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NO-1:0] reach;
    reach = '0;
    for (int c = 0; c < NI; c++) begin
      a_in = '0; a_in[c] = 1'b1; #1;
      check(a_out == ref_a(a_in), $sformatf("single chain %0d", c));
      check(a_out != '0, $sformatf("chain %0d reaches no MISR input", c));
      reach |= a_out;
    end
    for (int j = 0; j < NO; j++) begin
      // each output is the XOR of exactly three distinct chains
      int cnt;
      cnt = 0;
      for (int c = 0; c < NI; c++) begin
        a_in = '0; a_in[c] = 1'b1; #1;
        cnt += int'(a_out[j]);
      end
      check(cnt == 3, $sformatf("output %0d depends on %0d chains", j, cnt));
    end
    begin
      // chain c+1 must not reach the MISR as chain c shifted by one stage
      logic [NO-1:0] prev;
      int aliased;
      aliased = 0;
      a_in = '0; a_in[0] = 1'b1; #1; prev = a_out;
      for (int c = 1; c < NI; c++) begin
        a_in = '0; a_in[c] = 1'b1; #1;
        if ((a_out >> 1) == prev) aliased++;
        prev = a_out;
      end
      check(aliased < int'(NI / 8), $sformatf("%0d chains alias their neighbour", aliased));
    end
    for (int t = 0; t < 500; t++) begin
      for (int w = 0; w < NI / 32; w++) a_in[w*32 +: 32] = $urandom;
      #1;
      check(a_out == ref_a(a_in), "random slice, default size");
      b_in = SI'($urandom); #1;
      for (int j = 0; j < SO; j++)
        b_ref[j] = b_in[ps_tap_n(j, 0, SI)] ^ b_in[ps_tap_n(j, 1, SI)] ^ b_in[ps_tap_n(j, 2, SI)];
      check(b_out == b_ref, "random slice, small size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
