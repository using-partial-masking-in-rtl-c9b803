// tb_selection_reg: loads random 256-bit selection vectors over 8 channels and checks that
// after exactly M/SEL_CH = 32 shift cycles the register equals the vector (first chunk in the
// low bits), that one shift fewer does not yet give it, that it holds with shift low, and that
// clear empties it.
module tb_selection_reg;
  localparam int unsigned M = xcm_pkg::MISR_W, CH = xcm_pkg::SEL_CH, LOADS = M / CH;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, shift = 1'b0;
  logic [CH-1:0] din = '0;
  logic [M-1:0]  sel, vec;
  int checks = 0, failures = 0, cycles;
  always #5 clk = ~clk;

  selection_reg u_dut (.clk, .rst_n, .clear, .shift, .din, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(sel == '0, "reset value");
    for (int t = 0; t < 50; t++) begin
      for (int w = 0; w < M / 32; w++) vec[w*32 +: 32] = $urandom;
      cycles = 0;
      for (int k = 0; k < LOADS; k++) begin
        @(negedge clk);
        if (k == LOADS - 1) check(sel != vec, "vector present one shift early");
        shift = 1'b1; din = vec[k*CH +: CH];
        @(posedge clk); cycles++;
      end
      @(negedge clk); shift = 1'b0;
      check(cycles == LOADS, "load length");
      check(sel == vec, $sformatf("loaded vector %0d", t));
      repeat (3) @(negedge clk);
      check(sel == vec, "hold with shift low");
    end
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(sel == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
