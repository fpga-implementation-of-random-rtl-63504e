// aplusbmodn: modular adder, y = (a + b) mod n.
//
// a and b are 16-bit, n is 17-bit so that the design's modulus 65537
// (0x10001) fits. The 17-bit sum is reduced by a true remainder, so any
// n works; n = 0 is defined here to return the sum unchanged. y keeps the
// low 16 bits of the remainder: with n = 65537 the one remainder that does
// not fit, 65536 (a + b = 65536), leaves y = 0.
// Port names and widths follow the source design's adder; the 16-bit
// truncation and the n = 0 rule are this design's reading. Combinational.
module aplusbmodn
  import rng_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  mod_t  n,
  output word_t y
);

  mod_t sum;

  always_comb begin
    sum = MOD_W'(a) + MOD_W'(b);
    y   = word_t'((n == '0) ? sum : (sum % n));
  end

endmodule
