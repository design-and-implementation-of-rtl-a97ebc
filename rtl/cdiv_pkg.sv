// Shared types and constants of the radix-4 complex divider.
//
// A quotient digit lies in the maximally redundant radix-4 set {-3..3}
// and is carried as a 3-bit two's complement number (digit_t). The
// prescaling factor K has 3 integer and 6 fractional bits (t = 6), the
// ROM magnitudes 2 integer and 6 fractional bits, as in the look-up
// scheme. The cycle budget of the controller (3 look-up cycles, 4 cycles
// per complex product) matches the published timing of the unit; the
// packaging into one package is this design's own choice.
package cdiv_pkg;

  typedef logic signed [2:0] digit_t;     // quotient digit, -3..3

  localparam int unsigned T_FRAC      = 6;          // fractional bits of K (t)
  localparam int unsigned KMAG_W      = 2 + T_FRAC; // ROM magnitude width
  localparam int unsigned K_W         = 3 + T_FRAC; // signed K width
  localparam int unsigned LOOKUP_CYC  = 3;          // prescaling look-up cycles
  localparam int unsigned SCALE_CYC   = 4;          // cycles per complex product

  // Full adder used by the carry-save reduction trees.
  function automatic logic [1:0] fa(input logic x, input logic y, input logic z);
    fa = {(x & y) | (x & z) | (y & z), x ^ y ^ z};  // {carry, sum}
  endfunction

endpackage
