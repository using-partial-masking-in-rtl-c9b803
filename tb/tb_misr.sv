// tb_misr: self-checking testbench for the MISR.
//
// Part 1 reproduces the 6-bit worked example: six chains of three cells are shifted in over
// three cycles, and the final stages must equal the printed symbolic equations
// M1 = X1^O3^O8^O13 ... M6 = O2^X3^X4, for many random assignments of the 18 symbols.
// Part 2 compares a 256-bit MISR (default polynomial) against a vector-level reference model,
// including clear and hold. Part 3 checks that the 8-bit default polynomial is maximal length
// (period 255 with zero input).
module tb_misr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- 6-bit example ----------------
  logic       c6, e6;
  logic [5:0] d6, s6;
  misr #(.M(6)) u6 (.clk, .rst_n, .clear(c6), .en(e6), .d(d6), .sig(s6));

  // ---------------- 256-bit ----------------
  localparam int unsigned MB = 256;
  logic          cb, eb;
  logic [MB-1:0] db, sb, refb, tapsb;
  misr #(.M(MB)) ub (.clk, .rst_n, .clear(cb), .en(eb), .d(db), .sig(sb));

  // ---------------- 8-bit period ----------------
  logic       c8, e8;
  logic [7:0] d8, s8;
  misr #(.M(8)) u8 (.clk, .rst_n, .clear(c8), .en(e8), .d(d8), .sig(s8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] o;  // o[k] is symbol O_k (indices 2,3,5,6,8..17 used)
  logic [4:0]  x;  // x[k] is symbol X_k (1..4)
  logic [5:0]  expm;
  int          period;

  initial begin
    c6 = 0; e6 = 0; d6 = '0; cb = 0; eb = 0; db = '0; c8 = 0; e8 = 0; d8 = '0;
    tapsb = '0; tapsb[253] = 1'b1; tapsb[250] = 1'b1; tapsb[245] = 1'b1; tapsb[MB-1] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Part 1: the worked example; d6[0] is the top chain, d6[5] the bottom one.
    for (int t = 0; t < 300; t++) begin
      o = 18'($urandom); x = 5'($urandom);
      @(negedge clk); c6 = 1; @(negedge clk); c6 = 0; e6 = 1;
      d6 = {o[6],  o[5],  x[2],  o[3],  o[2],  x[1]};  @(negedge clk);
      d6 = {o[12], o[11], o[10], o[9],  o[8],  x[3]};  @(negedge clk);
      d6 = {x[4],  o[17], o[16], o[15], o[14], o[13]}; @(negedge clk);
      e6 = 0;
      expm[0] = x[1] ^ o[3] ^ o[8] ^ o[13];
      expm[1] = x[1] ^ o[2] ^ x[2] ^ x[3] ^ o[9] ^ o[14];
      expm[2] = o[2] ^ o[5] ^ x[3] ^ o[10] ^ o[15];
      expm[3] = x[1] ^ o[6] ^ o[11] ^ o[16];
      expm[4] = x[1] ^ o[2] ^ x[3] ^ o[12] ^ o[17];
      expm[5] = o[2] ^ x[3] ^ x[4];
      check(s6 == expm, $sformatf("example signature %b expected %b", s6, expm));
      @(negedge clk);
      check(s6 == expm, "example signature holds with en low");
    end

    // Part 2: 256-bit against a reference
    @(negedge clk); cb = 1; @(negedge clk); cb = 0;
    refb = '0;
    check(sb == '0, "256-bit clear");
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < MB / 32; w++) db[w*32 +: 32] = $urandom;
      eb = ($urandom % 4) != 0;
      @(negedge clk);
      if (eb) refb = (refb >> 1) ^ db ^ (refb[0] ? tapsb : '0);
      check(sb == refb, $sformatf("256-bit step %0d", t));
    end
    eb = 0; cb = 1; @(negedge clk); cb = 0;
    check(sb == '0, "256-bit clear after use");

    // Part 3: maximal period of the 8-bit default polynomial (seed via one input bit)
    e8 = 1; d8 = 8'h01; @(negedge clk); d8 = '0;
    period = 0;
    do begin @(negedge clk); period++; end while (s8 != 8'h01 && period < 1000);
    e8 = 0;
    check(period == 255, $sformatf("8-bit period %0d expected 255", period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
