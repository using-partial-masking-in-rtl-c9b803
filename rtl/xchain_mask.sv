// xchain_mask: partial X-masking of the X-chains.
//
// Each X-chain output passes through one 2-input AND gate whose other input is the single
// X-chain mask bit driven by one dedicated tester channel. With the mask bit at 0 (the usual
// value) every X-chain bit of the current scan slice is forced to the known value 0, so the
// X's those chains carry never reach the MISR. In slices where at least one X-chain cell holds
// a fault effect (a "D") the tester drives the bit to 1 and the whole slice passes; any X in
// that slice then leaks into the MISR, where it is canceled later. Regular scan chains are not
// masked at all. Purely combinational; the mask bit is applied in the cycle it arrives.
// One shared mask bit and one AND gate per X-chain follow the described scheme.
module xchain_mask #(
  parameter int unsigned N_XCHAINS = xcm_pkg::N_XCHAINS
) (
  input  logic [N_XCHAINS-1:0] xchain_in,  // scan-out bits of the X-chains, one slice
  input  logic                 mask_n,     // X-chain mask bit: 0 = mask, 1 = pass
  output logic [N_XCHAINS-1:0] xchain_out  // to the phase shifter
);
  always_comb xchain_out = xchain_in & {N_XCHAINS{mask_n}};
endmodule
