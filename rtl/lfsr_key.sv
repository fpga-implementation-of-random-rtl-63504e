// lfsr_key: 16-bit Fibonacci linear feedback shift register for one lane.
//
// load copies key_in into the register (an all-zero key_in is replaced by
// ZERO_SEED so the register cannot lock up); step shifts the register one
// place towards the MSB, the new LSB being the XOR of the state bits
// selected by TAPS. key_out is the register. load wins over step. Both act
// on the rising clock edge; rst_n is an asynchronous active-low reset to
// ZERO_SEED.
//
// The source design gives the LFSR's role (seeded by a lane word, it
// produces a 16-bit pseudorandom word) and its port names; the feedback
// polynomial, the shift direction, the load/step controls and the zero-seed
// guard are this design's choices. The default polynomial
// x^16 + x^14 + x^13 + x^11 + 1 has period 65535.
module lfsr_key
  import rng_pkg::*;
#(
  parameter int unsigned         WIDTH = WORD_W,
  parameter logic [WIDTH-1:0]    TAPS  = LFSR_TAPS,
  parameter logic [WIDTH-1:0]    ZSEED = ZERO_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  input  logic [WIDTH-1:0] key_in,
  output logic [WIDTH-1:0] key_out
);

  logic [WIDTH-1:0] state_q;
  logic             feedback;

  assign feedback = ^(state_q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state_q <= ZSEED;
    else if (load)
      state_q <= (key_in == '0) ? ZSEED : key_in;
    else if (step)
      state_q <= {state_q[WIDTH-2:0], feedback};
  end

  assign key_out = state_q;

endmodule
