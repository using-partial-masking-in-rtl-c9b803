// xcanceling_misr_top: X-canceling MISR with partial masking of the X-chains.
//
// Scan cells that capture X's most often are stitched into a few X-chains (chains
// 0 .. N_XCHAINS-1 of scan_out); the rest form regular chains. Each shift cycle one scan slice
// arrives. The X-chain bits pass through AND gates driven by one tester mask bit (xmask_n = 0
// masks them to 0; the tester raises it only in slices where an X-chain carries a fault
// effect, letting the X's of that slice leak). All chain bits then go through a phase shifter
// into an M-bit MISR. The MISR may span several test vectors; when it holds as many X's as
// it can (up to M - q for q checked combinations) capture stops (misr_en low) and the
// signature is read out: for each of q combinations the tester shifts a selection vector into
// the selection register (M/SEL_CH cycles with sel_shift high), the AND/XOR network produces
// xc_bit, an X-free value the tester compares with its expectation, and optionally a
// strobe (xfree_en) folds it into the X-free MISR. misr_clear then starts the next signature.
//
// Interface: all control comes from the tester, so this block has no sequencer of its own:
// xmask_n, misr_clear/misr_en, sel_clear/sel_shift/sel_din, xfree_clear/xfree_en. xc_bit is
// combinational from the held signature and the selection register, valid the cycle after the
// last selection shift. Protocol rule (asserted): a combination is strobed only while the
// signature and the selection vector are both stable.
// The datapath follows the described architecture; the tester-driven control interface, the
// chain count, the channel count and the polynomials are this design's choices.
module xcanceling_misr_top #(
  parameter int unsigned M         = xcm_pkg::MISR_W,
  parameter int unsigned N_CHAINS  = xcm_pkg::N_CHAINS,
  parameter int unsigned N_XCHAINS = xcm_pkg::N_XCHAINS,
  parameter int unsigned SEL_CH    = xcm_pkg::SEL_CH,
  parameter int unsigned XFREE_W   = xcm_pkg::XFREE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // scan slice: bits N_XCHAINS-1:0 come from X-chains, the rest from regular chains
  input  logic [N_CHAINS-1:0] scan_out,
  input  logic                xmask_n,     // X-chain mask bit, one tester channel
  // MISR capture control
  input  logic                misr_clear,
  input  logic                misr_en,
  // selection register load
  input  logic                sel_clear,
  input  logic                sel_shift,
  input  logic [SEL_CH-1:0]   sel_din,
  // X-canceled output and optional X-free MISR
  output logic                xc_bit,
  input  logic                xfree_clear,
  input  logic                xfree_en,
  output logic [XFREE_W-1:0]  xfree_sig
);
  if (N_XCHAINS == 0 || N_XCHAINS >= N_CHAINS) begin : g_bad_chains
    $error("xcanceling_misr_top: need 0 < N_XCHAINS < N_CHAINS");
  end

  logic [N_XCHAINS-1:0] xchain_masked;
  logic [N_CHAINS-1:0]  slice;
  logic [M-1:0]         misr_d, sig, sel;

  xchain_mask #(.N_XCHAINS(N_XCHAINS)) u_mask (
    .xchain_in (scan_out[N_XCHAINS-1:0]),
    .mask_n    (xmask_n),
    .xchain_out(xchain_masked)
  );

  assign slice = {scan_out[N_CHAINS-1:N_XCHAINS], xchain_masked};

  phase_shifter #(.N_IN(N_CHAINS), .N_OUT(M)) u_ps (
    .chain_in(slice),
    .misr_in (misr_d)
  );

  misr #(.M(M)) u_misr (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(misr_clear),
    .en   (misr_en),
    .d    (misr_d),
    .sig  (sig)
  );

  selection_reg #(.M(M), .SEL_CH(SEL_CH)) u_sel (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(sel_clear),
    .shift(sel_shift),
    .din  (sel_din),
    .sel  (sel)
  );

  xcancel_xor #(.M(M)) u_xor (
    .sig   (sig),
    .sel   (sel),
    .xc_bit(xc_bit)
  );

  xfree_misr #(.W(XFREE_W)) u_xfree (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(xfree_clear),
    .en   (xfree_en),
    .din  (xc_bit),
    .sig  (xfree_sig)
  );

  // A combination is only meaningful while the signature and the selection vector hold.
  a_strobe_stable: assert property (@(posedge clk) disable iff (!rst_n)
    xfree_en |-> !misr_en && !misr_clear && !sel_shift && !sel_clear)
    else $error("xc_bit strobed while signature or selection vector changes");
endmodule
