// mdc_pkg: types and helpers shared by the multiplier-based test vector
// decompressor.
//
// The decompressor reuses a functional bit-serial multiplier as a test data
// expander: each N x N block of a test cube is stored as two N-bit operands,
// and the sum registers of the multiplier, run in GF(2) mode, step through the
// N bit-slices of the block. This package holds the multiplier mode, the
// delivery mode (compressed or raw test cubes) and the feedback taps of the
// response compactor (MISR). The MISR polynomials are this design's choice:
// the scheme only says that responses are compacted in a MISR.
package mdc_pkg;

  // Multiplier configuration. Integer mode is the functional binary
  // multiply; GF(2) mode forces the carry-register outputs to zero.
  typedef enum logic {
    MUL_INT = 1'b0,
    MUL_GF2 = 1'b1
  } mul_mode_e;

  // How the current test cube reaches the scan chains.
  typedef enum logic {
    CUBE_COMPRESSED = 1'b0,  // two operands per block, expanded by the multiplier
    CUBE_RAW        = 1'b1   // every bit sent by the tester, two bits per cycle
  } cube_mode_e;

  // Feedback taps of an internal-XOR MISR of width w (bit i set: the bit
  // shifted out of the top stage is XORed into stage i). Primitive
  // polynomials for the widths the scheme is evaluated at; other widths
  // fall back to x^w + x + 1 (not necessarily primitive).
  function automatic logic [63:0] misr_taps(input int unsigned w);
    case (w)
      4:       return 64'h3;                  // x^4 + x + 1
      8:       return 64'h1D;                 // x^8 + x^4 + x^3 + x^2 + 1
      16:      return 64'h100B;               // x^16 + x^12 + x^3 + x + 1
      32:      return 64'h0000_0000_0040_0007; // x^32 + x^22 + x^2 + x + 1
      64:      return 64'h0000_0000_0000_001B; // x^64 + x^4 + x^3 + x + 1
      default: return 64'h3;
    endcase
  endfunction

endpackage
