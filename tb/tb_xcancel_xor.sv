// tb_xcancel_xor: checks the AND/XOR network that forms an X-canceled combination.
// Random signatures and selections at 256 bits are compared with a bit-by-bit parity; then
// the 6-bit worked example: the MISR equations are evaluated for random symbols and the
// combinations M1^M3^M5 and M1^M4 must equal their X-free expressions
// O3^O5^O8^O10^O12^O13^O15^O17 and O3^O6^O8^O11^O13^O16 whatever the X's are.
module tb_xcancel_xor;
  localparam int unsigned M = xcm_pkg::MISR_W;
  logic [M-1:0] sig, sel;
  logic         xc;
  logic [5:0]   s6, l6;
  logic         x6;
  int checks = 0, failures = 0;

  xcancel_xor u_dut (.sig(sig), .sel(sel), .xc_bit(xc));
  xcancel_xor #(.M(6)) u_ex (.sig(s6), .sel(l6), .xc_bit(x6));

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
    logic p;
    logic [17:0] o;
    logic [4:0]  x;
    for (int t = 0; t < 1000; t++) begin
      for (int w = 0; w < M / 32; w++) begin sig[w*32 +: 32] = $urandom; sel[w*32 +: 32] = $urandom; end
      if (t % 10 == 0) sel = '0;
      #1;
      p = 1'b0;
      for (int i = 0; i < M; i++) if (sel[i]) p ^= sig[i];
      check(xc == p, $sformatf("parity %0d", t));
    end
    for (int t = 0; t < 200; t++) begin
      o = 18'($urandom); x = 5'($urandom);
      s6[0] = x[1] ^ o[3] ^ o[8] ^ o[13];
      s6[1] = x[1] ^ o[2] ^ x[2] ^ x[3] ^ o[9] ^ o[14];
      s6[2] = o[2] ^ o[5] ^ x[3] ^ o[10] ^ o[15];
      s6[3] = x[1] ^ o[6] ^ o[11] ^ o[16];
      s6[4] = x[1] ^ o[2] ^ x[3] ^ o[12] ^ o[17];
      s6[5] = o[2] ^ x[3] ^ x[4];
      l6 = 6'b010101; #1;
      check(x6 == (o[3]^o[5]^o[8]^o[10]^o[12]^o[13]^o[15]^o[17]), "M1^M3^M5 example");
      l6 = 6'b001001; #1;
      check(x6 == (o[3]^o[6]^o[8]^o[11]^o[13]^o[16]), "M1^M4 example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
