// rng_pkg: sizes, constants and types shared by the LFSR/scrambling random
// number generator.
//
// The generator turns one 64-bit initial key into five 16-bit round keys:
// the key is cut into sixteen nibbles, regrouped into four 16-bit words,
// each word is XORed with the output of its own 16-bit LFSR, bit-shuffled,
// and the four results are folded by a Fibonacci-style chain of additions
// modulo 65537 into K1..K5.
//
// Taken from the source design: the 64-bit key, 4-bit nibbles, four 16-bit
// lanes, five keys and the modulus 0x10001 (65537). Chosen here: the LFSR
// feedback polynomial, the shuffle, the warm-up length and the seed that
// replaces an all-zero lane word.
package rng_pkg;

  localparam int unsigned KEY_W    = 64;  // initial key width
  localparam int unsigned NIB_W    = 4;   // partition block width
  localparam int unsigned LANES    = 4;   // number of 16-bit lanes / LFSRs
  localparam int unsigned WORD_W   = 16;  // lane and round-key width
  localparam int unsigned NUM_KEYS = 5;   // round keys K1..K5
  localparam int unsigned MOD_W    = WORD_W + 1;

  // Modulus of the scrambling additions: 0x10001 = 65537.
  localparam logic [MOD_W-1:0] MODULUS = 17'h1_0001;

  // Fibonacci LFSR taps (bit i set = state[i] feeds the XOR), shifting
  // towards the MSB: x^16 + x^14 + x^13 + x^11 + 1, maximal length 65535.
  localparam logic [WORD_W-1:0] LFSR_TAPS = 16'hB400;

  // Seed loaded instead of an all-zero lane word (an LFSR stuck at zero
  // would never leave it).
  localparam logic [WORD_W-1:0] ZERO_SEED = 16'h0001;

  // LFSR steps taken after a load before the first key set is produced.
  localparam int unsigned WARMUP = 16;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [MOD_W-1:0]  mod_t;

  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,  // no key loaded yet
    ST_WARMUP = 2'd1,  // LFSRs stepping, no output yet
    ST_RUN    = 2'd2   // one key set per enabled cycle
  } state_e;

endpackage
