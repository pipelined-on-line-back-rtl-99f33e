// pbp_pkg: number format and arithmetic shared by every block of the
// pipelined back-propagation network.
//
// All neuron values (inputs x_k, hidden outputs h_i, errors e, deltas and
// weights) are signed two's-complement fixed-point words of WORD_W bits with
// FRAC fractional bits (Q15.16 by default, one 32-bit word as on a 32-bit
// soft-core bus). fmul() multiplies two such words and truncates the product
// toward minus infinity back to the same format. The word width, the format
// and the truncation are choices of this design; the network itself only
// needs some real-valued arithmetic.
package pbp_pkg;

  parameter int WORD_W = 32;
  parameter int FRAC   = 16;

  typedef logic signed [WORD_W-1:0] fix_t;

  // 1.0 in the fixed-point format
  localparam fix_t FIX_ONE = fix_t'(1) <<< FRAC;

  // Fixed-point product, truncated to FRAC fractional bits.
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [2*WORD_W-1:0] p;
    p = (2*WORD_W)'(a) * (2*WORD_W)'(b);
    return fix_t'(p >>> FRAC);
  endfunction

endpackage
