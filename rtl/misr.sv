// misr: M-bit multiple-input signature register with internal (Galois) feedback.
//
// Bit 0 is the output end ("top") of the register. On every enabled clock edge
//   next[i]   = cur[i+1] ^ d[i] ^ (TAPS[i] & cur[0])    for i < M-1
//   next[M-1] = cur[0]   ^ d[M-1]
// so the register shifts towards bit 0, every stage adds its own input bit, and the top bit
// is fed back to the bottom stage and to every stage whose TAPS bit is set. This is the
// structure of the small 6-bit example register (feedback into stages 2, 3, 5 and 6 counted
// from the top) generalised to M bits; the 256-bit default polynomial is this design's
// choice. The signature is linear in all inputs, which is what makes X-canceling possible.
// 'clear' (synchronous) empties the register before a new signature; with 'en' low the
// signature holds, so it can be read out through the selection logic. rst_n is asynchronous.
// Timing: d is sampled on the rising edge; sig is the register itself.
module misr #(
  parameter int unsigned     M    = xcm_pkg::MISR_W,
  parameter logic [M-1:0]    TAPS = M'(xcm_pkg::default_taps(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [M-1:0] sig
);
  logic [M-1:0] nxt;

  always_comb begin
    for (int i = 0; i < int'(M) - 1; i++)
      nxt[i] = sig[i+1] ^ d[i] ^ (TAPS[i] & sig[0]);
    nxt[M-1] = sig[0] ^ d[M-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= nxt;
  end
endmodule
