// ahsd_pkg -- shared type of the radix-4 asymmetric high-radix signed-digit
// (AHSD(4)) blocks.
//
// An AHSD(4) digit takes a value in {-1, 0, 1, 2, 3}: the radix-4 digit set
// extended by the single negative digit -1. On wires such a digit is a
// 3-bit two's-complement number (digit_t). Blocks that support any radix
// r = 2^M use the same layout with M+1 bits, so for M = 2 their ports are
// digit_t. The number system is the one the design follows; the binary
// encoding of a digit is this design's own choice (the original circuits
// carry digits as multiple-valued currents).
package ahsd_pkg;

  localparam int DIGIT_MIN = -1;
  localparam int DIGIT_MAX = 3;   // r - 1 for r = 4

  // One AHSD(4) digit, -1 .. 3.
  typedef logic signed [2:0] digit_t;

  // True when d is a legal AHSD(4) digit.
  function automatic logic digit_ok(digit_t d);
    return (d >= digit_t'(DIGIT_MIN)) && (d <= digit_t'(DIGIT_MAX));
  endfunction

endpackage
