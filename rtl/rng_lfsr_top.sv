// rng_lfsr_top: LFSR and scrambling random number generator producing five
// 16-bit round keys from a 64-bit initial key.
//
// Datapath (one key set per clock in the run phase):
//   inkey -> key_partition -> pp1..pp4 (held in seed_q)
//   pp_i  -> lfsr_key (seeded with pp_i)             -> r_i
//   pp_i ^ r_i -> bit_shuffle                         -> Q_i
//   Q1..Q4 -> fib_scrambler (additions mod 65537)     -> K1..K5 -> k_o
//
// Control, with load taking priority in every state:
//   load  : inkey is partitioned, pp1..pp4 are stored and seed the four
//           LFSRs; the generator enters the warm-up phase.
//   warm-up: the LFSRs step WARMUP_STEPS times with no output (without it
//           the first LFSR word would equal its seed and the XOR would
//           cancel to zero).
//   run   : each cycle with en high the current LFSR words are whitened,
//           shuffled and scrambled, the result is registered into k_o with
//           key_valid high one clock later, and the LFSRs step. With en low
//           the LFSRs hold and key_valid drops.
// Timing: load in cycle t gives ready from cycle t+1+WARMUP_STEPS; en in
// cycle u gives key_valid and the key set in cycle u+1. rst_n is an
// asynchronous active-low reset to the idle state.
//
// Following the source design: the nibble regrouping, one 16-bit LFSR per
// lane, the XOR of each lane word with its LFSR word, the shuffle stage,
// the Fibonacci recurrence with modulus 0x10001 and the five keys. This
// design's own: the clocked load / warm-up / run control, the warm-up
// length, the registered outputs, the LFSR polynomial and the shuffle
// permutation. SHUFFLE_EN = 0 wires the whitened words straight to the
// scrambler, as in the source design's synthesized schematic.
module rng_lfsr_top
  import rng_pkg::*;
#(
  parameter int unsigned WARMUP_STEPS = WARMUP,
  parameter bit          SHUFFLE_EN   = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,       // start: take inkey as the new seed
  input  logic [KEY_W-1:0] inkey,      // 64-bit initial key
  input  logic             en,         // run phase: produce a key set
  output logic             ready,      // run phase reached, en is honoured
  output logic             key_valid,  // k_o holds a new key set
  output word_t            k_o [NUM_KEYS]  // k_o[0..4] = K1..K5
);

  localparam int unsigned CNT_W = (WARMUP_STEPS > 1) ? $clog2(WARMUP_STEPS) : 1;

  state_e            state_q;
  logic [CNT_W-1:0]  warm_cnt_q;
  word_t             pp_c     [LANES];
  word_t             seed_q   [LANES];
  word_t             lfsr_w   [LANES];
  word_t             white_w  [LANES];
  word_t             q_w      [LANES];
  word_t             keys_c   [NUM_KEYS];
  logic              lfsr_step;

  // ---------------------------------------------------------------- control
  assign ready     = (state_q == ST_RUN);
  assign lfsr_step = !load && ((state_q == ST_WARMUP) || (state_q == ST_RUN && en));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      warm_cnt_q <= '0;
    end else if (load) begin
      state_q    <= (WARMUP_STEPS == 0) ? ST_RUN : ST_WARMUP;
      warm_cnt_q <= '0;
    end else if (state_q == ST_WARMUP) begin
      if (32'(warm_cnt_q) == WARMUP_STEPS - 1)
        state_q <= ST_RUN;
      warm_cnt_q <= warm_cnt_q + 1'b1;
    end
  end

  // --------------------------------------------------------------- datapath
  key_partition u_part (.inkey(inkey), .pp(pp_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES; i++) seed_q[i] <= '0;
    end else if (load) begin
      seed_q <= pp_c;
    end
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    lfsr_key u_lfsr (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (load),
      .step   (lfsr_step),
      .key_in (pp_c[i]),
      .key_out(lfsr_w[i])
    );

    assign white_w[i] = seed_q[i] ^ lfsr_w[i];

    if (SHUFFLE_EN) begin : g_shuf
      bit_shuffle u_shuf (.din(white_w[i]), .dout(q_w[i]));
    end else begin : g_noshuf
      assign q_w[i] = white_w[i];
    end
  end

  fib_scrambler u_scr (.q(q_w), .n(MODULUS), .k(keys_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_valid <= 1'b0;
      for (int i = 0; i < NUM_KEYS; i++) k_o[i] <= '0;
    end else if (load) begin
      key_valid <= 1'b0;
    end else if (state_q == ST_RUN && en) begin
      key_valid <= 1'b1;
      k_o       <= keys_c;
    end else begin
      key_valid <= 1'b0;
    end
  end

endmodule
