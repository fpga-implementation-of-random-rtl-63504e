// key_partition: regroups the 64-bit initial key into four 16-bit words.
//
// The key is read as sixteen 4-bit blocks p1..p16, p1 being the most
// significant nibble (inkey[63:60]) and p16 the least (inkey[3:0]). Every
// fourth block is concatenated, first block in the upper bits:
//   pp1 = p1||p5||p9||p13,  pp2 = p2||p6||p10||p14,
//   pp3 = p3||p7||p11||p15, pp4 = p4||p8||p12||p16.
// pp[0] is pp1. The regrouping is the source design's; reading p1 as the
// most significant nibble is this design's choice. Purely combinational,
// no timing of its own.
module key_partition
  import rng_pkg::*;
(
  input  logic [KEY_W-1:0] inkey,
  output word_t            pp [LANES]
);

  localparam int unsigned NIBS = KEY_W / NIB_W;  // 16 blocks
  localparam int unsigned PER  = NIBS / LANES;   // 4 blocks per word

  always_comb begin
    for (int w = 0; w < LANES; w++) begin
      for (int j = 0; j < PER; j++) begin
        // Word w takes blocks p(w+1), p(w+1+LANES), ...; block p(m) with
        // m = w + j*LANES (0-based) sits at inkey[KEY_W-1-m*NIB_W -: NIB_W].
        // Its place in the word counts down from the top nibble.
        pp[w][WORD_W-1-j*NIB_W -: NIB_W] = inkey[KEY_W-1-(w+j*LANES)*NIB_W -: NIB_W];
      end
    end
  end

endmodule
