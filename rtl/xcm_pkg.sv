// xcm_pkg: constants shared by the X-canceling MISR with partially masked X-chains.
//
// The 256-bit MISR, the 12 X-chains (the optimum found for the main example circuit) and
// the q = 7 X-canceled combinations checked per signature (error coverage 1 - 2^-7 = 99.2%)
// follow the described architecture. The number of regular scan chains, the number of tester
// channels that load the selection register, the width of the optional X-free MISR and all
// feedback polynomials are choices of this design; the architecture leaves them open.
//
// MISR feedback form used throughout (see misr.sv): bit 0 is the output end of the register;
// every cycle bit i takes bit i+1, its own input, and bit 0 if TAPS[i] is set; the last bit
// always takes bit 0. default_taps() returns a tap mask for the sizes used here: well-known
// maximal-length polynomials, and for M = 6 the small
// example register with feedback into bits 1, 2, 4 and 5.
package xcm_pkg;

  localparam int unsigned MISR_W      = 256; // m, MISR size
  localparam int unsigned N_XCHAINS   = 12;  // X-chains behind the mask AND gates
  localparam int unsigned N_CHAINS    = 128; // all scan chains, X-chains included (own choice)
  localparam int unsigned SEL_CH      = 8;   // tester channels loading the selection register (own choice)
  localparam int unsigned Q_COMB      = 7;   // X-canceled combinations checked per signature
  localparam int unsigned XFREE_W     = 32;  // optional X-free MISR width (own choice)
  localparam int unsigned MAX_TAPS_W  = 512;

  // Tap mask for an M-bit register in the feedback form described above. For the polynomial
  // x^n + x^a + x^b + x^c + 1 the mask has bits a-1, b-1, c-1 set (the x^n term is the
  // unconditional feedback into bit n-1); the register then cycles through all 2^n - 1
  // non-zero states when run without input. The polynomials are standard maximal-length ones.
  function automatic logic [MAX_TAPS_W-1:0] default_taps(int unsigned m);
    logic [MAX_TAPS_W-1:0] t;
    t = '0;
    case (m)
      6:   begin t[1] = 1'b1; t[2] = 1'b1; t[4] = 1'b1; end          // small worked example
      8:   begin t[5] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end          // x^8+x^6+x^5+x^4+1
      16:  begin t[14] = 1'b1; t[12] = 1'b1; t[3] = 1'b1; end        // x^16+x^15+x^13+x^4+1
      32:  begin t[21] = 1'b1; t[1] = 1'b1; t[0] = 1'b1; end         // x^32+x^22+x^2+x+1
      64:  begin t[62] = 1'b1; t[60] = 1'b1; t[59] = 1'b1; end       // x^64+x^63+x^61+x^60+1
      128: begin t[125] = 1'b1; t[100] = 1'b1; t[98] = 1'b1; end     // x^128+x^126+x^101+x^99+1
      256: begin t[253] = 1'b1; t[250] = 1'b1; t[245] = 1'b1; end    // x^256+x^254+x^251+x^246+1
      default: begin t[0] = 1'b1; end                                // fallback: x^m+x+1
    endcase
    return t;
  endfunction

endpackage
