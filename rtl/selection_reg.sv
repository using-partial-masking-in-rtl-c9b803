// selection_reg: m-bit selection register of the X-canceling MISR.
//
// Holds one selection vector: bit i set means MISR bit i is part of the X-canceled
// combination. The tester loads it over SEL_CH channels: on every cycle with 'shift' high the
// register moves down by SEL_CH bits and din enters at the top, so after M/SEL_CH shifts the
// first chunk sent sits in bits SEL_CH-1:0 and the last in the top SEL_CH bits. 'clear'
// (synchronous) zeroes it; rst_n is asynchronous. A full load takes exactly M/SEL_CH cycles.
// The m-bit register follows the architecture; the serial-parallel loading and the number of
// channels are this design's choice.
module selection_reg #(
  parameter int unsigned M      = xcm_pkg::MISR_W,
  parameter int unsigned SEL_CH = xcm_pkg::SEL_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              shift,
  input  logic [SEL_CH-1:0] din,
  output logic [M-1:0]      sel
);
  if (M % SEL_CH != 0 || SEL_CH > M) begin : g_bad_width
    $error("selection_reg: M must be a multiple of SEL_CH");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel <= '0;
    else if (clear)  sel <= '0;
    else if (shift) begin
      if (SEL_CH == M) sel <= M'(din);
      else             sel <= {din, sel[M-1:SEL_CH]};
    end
  end
endmodule
