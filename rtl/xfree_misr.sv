// xfree_misr: optional serial-input MISR that compacts the X-canceled combinations.
//
// The X-canceled bits are free of X's, so instead of sending each to the tester they can be
// accumulated into a conventional signature that is read once at the end. Each cycle with
// 'en' high the register shifts towards bit 0 with internal feedback from bit 0 (same form as
// misr.sv) and din is added into the bottom stage. 'clear' is synchronous, rst_n asynchronous.
// That this register is optional and X-free follows the architecture; its width (32) and
// polynomial are this design's choice.
module xfree_misr #(
  parameter int unsigned  W    = xcm_pkg::XFREE_W,
  parameter logic [W-1:0] TAPS = W'(xcm_pkg::default_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] sig
);
  logic [W-1:0] nxt;

  always_comb begin
    for (int i = 0; i < int'(W) - 1; i++)
      nxt[i] = sig[i+1] ^ (TAPS[i] & sig[0]);
    nxt[W-1] = sig[0] ^ din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= nxt;
  end
endmodule
