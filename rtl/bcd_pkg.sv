// Shared types and helpers for the decimal (BCD) multiplier.
//
// Digits everywhere are 4-bit vectors. Three codes share that format:
//   BCD   : value = encoding, 0..9
//   XS-3  : value = encoding - 3, so the nine's complement of a digit is its
//           bit inversion (15 - (z+3) = (9-z) + 3)
//   ODDS  : value = encoding, 0..15 (overloaded decimal digit set)
// A signed radix-10 multiplier digit in [-5,5] is carried as a sign flag and
// a one-hot magnitude; zero has no bit set in the magnitude and no sign.
package bcd_pkg;

  typedef logic [3:0] digit_t;

  typedef struct packed {
    logic       neg;   // digit is negative
    logic [4:0] mag;   // one-hot magnitude: mag[k] means |digit| = k+1
  } sd_digit_t;

  localparam digit_t XS3_ZERO = 4'd3;  // XS-3 encoding of 0

  // Value of a signed digit as an integer (used by checks and testbenches).
  function automatic int sd_value(sd_digit_t d);
    int m = 0;
    for (int k = 0; k < 5; k++) if (d.mag[k]) m = k + 1;
    return d.neg ? -m : m;
  endfunction

endpackage
