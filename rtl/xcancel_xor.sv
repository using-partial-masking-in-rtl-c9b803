// xcancel_xor: forms one X-canceled combination from the MISR signature.
//
// Each MISR bit is ANDed with the matching selection-register bit and the M products are
// XORed together. When the selection vector is a linearly dependent set of MISR bits with
// respect to the X's (found off-line by symbolic simulation and Gauss-Jordan elimination),
// every X cancels and the output depends only on known response bits, so the tester can
// compare it with its fault-free value. Purely combinational (AND plane plus XOR tree).
// The AND gates and the XOR follow the architecture.
module xcancel_xor #(
  parameter int unsigned M = xcm_pkg::MISR_W
) (
  input  logic [M-1:0] sig,
  input  logic [M-1:0] sel,
  output logic         xc_bit
);
  always_comb xc_bit = ^(sig & sel);
endmodule
