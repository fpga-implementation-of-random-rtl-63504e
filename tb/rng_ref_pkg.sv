// rng_ref_pkg: reference model of the LFSR/scrambling random number
// generator, used by the testbenches to work out expected values.
//
// Every function is written from the algorithm's definition with plain
// integer arithmetic and does not reuse the RTL: nibbles are picked with
// shifts, the LFSR feedback names its four tap bits, the shuffle uses the
// formula P(k) = 4k mod 15 and the modular additions use 32-bit integers.
package rng_ref_pkg;

  localparam int MOD = 65537;

  // Nibble m (1..16) of the key, p1 being the most significant.
  function automatic int unsigned ref_nib(input logic [63:0] key, input int m);
    return int'((key >> (64 - 4*m)) & 64'hF);
  endfunction

  // ppw (w = 1..4) = p(w) || p(w+4) || p(w+8) || p(w+12)
  function automatic logic [15:0] ref_pp(input logic [63:0] key, input int w);
    int unsigned v;
    v = (ref_nib(key, w) << 12) | (ref_nib(key, w+4) << 8) |
        (ref_nib(key, w+8) << 4) | ref_nib(key, w+12);
    return v[15:0];
  endfunction

  // One step of x^16 + x^14 + x^13 + x^11 + 1, shifting towards the MSB.
  function automatic logic [15:0] ref_lfsr_next(input logic [15:0] s);
    logic fb;
    fb = s[15] ^ s[13] ^ s[12] ^ s[10];
    return {s[14:0], fb};
  endfunction

  function automatic logic [15:0] ref_seed(input logic [15:0] pp);
    return (pp == 16'h0) ? 16'h0001 : pp;
  endfunction

  // Input bit k moves to output bit P(k) = 4k mod 15, bit 15 stays.
  function automatic logic [15:0] ref_shuffle(input logic [15:0] d);
    logic [15:0] o;
    o = '0;
    for (int k = 0; k < 16; k++)
      o[(k == 15) ? 15 : ((4*k) % 15)] = d[k];
    return o;
  endfunction

  function automatic logic [15:0] ref_addmod(input int unsigned a, input int unsigned b,
                                             input int unsigned n);
    int unsigned r;
    r = (n == 0) ? (a + b) : ((a + b) % n);
    return r[15:0];
  endfunction

  typedef logic [15:0] key5_t [5];

  function automatic key5_t ref_scramble(input logic [15:0] q1, input logic [15:0] q2,
                                         input logic [15:0] q3, input logic [15:0] q4);
    key5_t k;
    k[0] = ref_addmod(q1, q2, MOD);
    k[1] = ref_addmod(q3, q4, MOD);
    for (int i = 2; i < 5; i++) k[i] = ref_addmod(k[i-1], k[i-2], MOD);
    return k;
  endfunction

  // Cycle model of the complete generator: call step() once per clock with
  // the inputs sampled at that edge; the fields then hold what the design
  // shows after the edge.
  class rng_model;
    int unsigned warmup;
    bit          shuffle_en;
    int          state;        // 0 idle, 1 warm-up, 2 run
    int unsigned cnt;
    logic [15:0] seed [4];
    logic [15:0] lfsr [4];
    bit          valid;
    key5_t       k;
    bit          wrapped;      // last produced set had a sum >= 65537

    function new(int unsigned warmup_steps, bit shuf);
      warmup = warmup_steps;
      shuffle_en = shuf;
      reset();
    endfunction

    function void reset();
      state = 0; cnt = 0; valid = 0; wrapped = 0;
      for (int i = 0; i < 4; i++) begin seed[i] = '0; lfsr[i] = 16'h0001; end
      for (int i = 0; i < 5; i++) k[i] = '0;
    endfunction

    // Q words from the current state.
    function void q_words(output logic [15:0] q [4]);
      for (int i = 0; i < 4; i++) begin
        q[i] = seed[i] ^ lfsr[i];
        if (shuffle_en) q[i] = ref_shuffle(q[i]);
      end
    endfunction

    function void step(bit load, logic [63:0] key, bit en);
      logic [15:0] q [4];
      if (load) begin
        for (int i = 0; i < 4; i++) begin
          seed[i] = ref_pp(key, i+1);
          lfsr[i] = ref_seed(seed[i]);
        end
        state = (warmup == 0) ? 2 : 1;
        cnt = 0;
        valid = 0;
      end else if (state == 1) begin
        for (int i = 0; i < 4; i++) lfsr[i] = ref_lfsr_next(lfsr[i]);
        cnt++;
        if (cnt == warmup) state = 2;
        valid = 0;
      end else if (state == 2 && en) begin
        q_words(q);
        k = ref_scramble(q[0], q[1], q[2], q[3]);
        wrapped = (32'(q[0]) + q[1] >= MOD) || (32'(q[2]) + q[3] >= MOD) ||
                  (32'(k[1]) + k[0] >= MOD) || (32'(k[2]) + k[1] >= MOD) ||
                  (32'(k[3]) + k[2] >= MOD);
        for (int i = 0; i < 4; i++) lfsr[i] = ref_lfsr_next(lfsr[i]);
        valid = 1;
      end else begin
        valid = 0;
      end
    endfunction
  endclass

endpackage
