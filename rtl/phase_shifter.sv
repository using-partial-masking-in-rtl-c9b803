// phase_shifter: XOR network from the scan-chain outputs to the MISR inputs.
//
// Every cycle one scan slice (one bit per chain) enters; each of the N_OUT outputs is the XOR
// of three distinct chain bits (one bit when N_IN < 3). Output j always takes chain j mod N_IN,
// so every chain reaches the MISR; its two other chains come from a fixed integer hash of
// (j, tap number), bumped by one if they would repeat a chain already used:
//   h(j,k) = mix(j * 0x9E3779B1 + k * 0x85EBCA77 + 1) mod N_IN,
//   mix(x): x ^= x >> 15; x *= 0x2C1B3C6D; x ^= x >> 12; x *= 0x297A2D39; x ^= x >> 15.
// The hashed taps matter: if chain positions only translated with the chain number, a value
// in chain c+1 would reach the signature exactly like a value in chain c one cycle later, so
// an X could hide a fault effect on the neighbouring chain. The network is linear, which is
// all X-canceling needs. Purely combinational.
// That a phase shifter sits between the chains and the MISR follows the architecture; its XOR
// pattern is this design's own choice.
module phase_shifter #(
  parameter int unsigned N_IN  = xcm_pkg::N_CHAINS,
  parameter int unsigned N_OUT = xcm_pkg::MISR_W
) (
  input  logic [N_IN-1:0]  chain_in,
  output logic [N_OUT-1:0] misr_in
);
  function automatic int unsigned mix(int unsigned v);
    int unsigned x = v;
    x ^= x >> 15; x *= 32'h2C1B3C6D;
    x ^= x >> 12; x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  // chain feeding tap k (0..2) of output j
  function automatic int unsigned tap(int unsigned j, int unsigned k);
    int unsigned i0 = j % N_IN;
    int unsigned i1 = mix(j * 32'h9E3779B1 + 32'h85EBCA77 + 1) % N_IN;
    int unsigned i2 = mix(j * 32'h9E3779B1 + 2 * 32'h85EBCA77 + 1) % N_IN;
    if (i1 == i0) i1 = (i1 + 1) % N_IN;
    for (int n = 0; n < 2; n++)
      if (i2 == i0 || i2 == i1) i2 = (i2 + 1) % N_IN;
    return (k == 0) ? i0 : (k == 1) ? i1 : i2;
  endfunction

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    if (N_IN >= 3) begin : g_x3
      localparam int unsigned I0 = tap(j, 0);
      localparam int unsigned I1 = tap(j, 1);
      localparam int unsigned I2 = tap(j, 2);
      assign misr_in[j] = chain_in[I0] ^ chain_in[I1] ^ chain_in[I2];
    end else begin : g_x1
      assign misr_in[j] = chain_in[j % N_IN];
    end
  end
endmodule
