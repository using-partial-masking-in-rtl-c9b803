// tb_xchain_mask: checks the X-chain mask AND gates. With the mask bit at 0 every X-chain
// bit must read 0 whatever the chains hold; with it at 1 the slice must pass unchanged.
// Random slices, both mask values, default (12 X-chains) width.
module tb_xchain_mask;
  localparam int unsigned NX = xcm_pkg::N_XCHAINS;
  logic [NX-1:0] xin, xout;
  logic          mask_n;
  int            checks = 0, failures = 0;

  xchain_mask u_dut (.xchain_in(xin), .mask_n(mask_n), .xchain_out(xout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      xin = NX'($urandom);
      mask_n = t[0];
      #1;
      checks++;
      if (mask_n ? (xout !== xin) : (xout !== '0)) begin
        failures++;
        $display("FAIL: mask_n=%b in=%h out=%h", mask_n, xin, xout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
