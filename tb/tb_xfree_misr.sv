// tb_xfree_misr: checks the 32-bit serial X-free MISR against a reference model over random
// input bits and enables, checks clear, and checks that the default polynomial has a long
// period (no return to the seed within 100000 cycles with zero input).
module tb_xfree_misr;
  localparam int unsigned W = xcm_pkg::XFREE_W;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  logic [W-1:0] sig, r, taps;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  xfree_misr u_dut (.clk, .rst_n, .clear, .en, .din, .sig);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit back;
    taps = '0; taps[21] = 1'b1; taps[1] = 1'b1; taps[0] = 1'b1; taps[W-1] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    r = '0;
    for (int t = 0; t < 3000; t++) begin
      din = 1'($urandom); en = ($urandom % 3) != 0;
      @(negedge clk);
      if (en) r = ((r >> 1) ^ (r[0] ? taps : '0)) ^ {din, {(W-1){1'b0}}};
      check(sig == r, $sformatf("step %0d", t));
    end
    en = 1'b0; clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(sig == '0, "clear");
    en = 1'b1; din = 1'b1; @(negedge clk); din = 1'b0;
    back = 1'b0;
    for (int t = 0; t < 100000; t++) begin
      @(negedge clk);
      if (sig == {1'b1, {(W-1){1'b0}}}) back = 1'b1;
    end
    check(!back, "period shorter than 100000");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
