// bit_shuffle: fixed bit permutation applied to each whitened lane word.
//
// Output bit 4*i+j is input bit 4*j+i (i, j in 0..3): the word is seen as a
// 4x4 bit matrix, one nibble per row, and transposed, so every output
// nibble takes one bit from each input nibble. This is the same mapping as
// the 16-bit form of the PRESENT bit permutation, P(k) = 4k mod 15.
// The source design places a "bit shuffling" stage here but does not give
// the permutation; the transpose is this design's choice. Combinational.
module bit_shuffle
  import rng_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  localparam int unsigned SIDE = 4;  // 16 bits = 4 x 4

  always_comb begin
    for (int i = 0; i < SIDE; i++)
      for (int j = 0; j < SIDE; j++)
        dout[SIDE*i+j] = din[SIDE*j+i];
  end

endmodule
