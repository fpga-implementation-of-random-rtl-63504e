// fib_scrambler: Fibonacci scrambling of the four lane words into round keys.
//
//   K1 = (Q1 + Q2) mod n
//   K2 = (Q3 + Q4) mod n
//   Ki = (K(i-1) + K(i-2)) mod n,   i = 3 .. NUM_KEYS
//
// q[0..3] are Q1..Q4 and k[0..NUM_KEYS-1] are K1..K5; every addition is an
// aplusbmodn instance. The recurrence and the five keys follow the source
// design. Combinational: K5 sits behind four chained modular adders.
module fib_scrambler
  import rng_pkg::*;
#(
  parameter int unsigned NKEYS = NUM_KEYS
) (
  input  word_t q [LANES],
  input  mod_t  n,
  output word_t k [NKEYS]
);

  aplusbmodn u_ap1 (.a(q[0]), .b(q[1]), .n(n), .y(k[0]));
  aplusbmodn u_ap2 (.a(q[2]), .b(q[3]), .n(n), .y(k[1]));

  for (genvar i = 2; i < NKEYS; i++) begin : g_fib
    aplusbmodn u_ap (.a(k[i-1]), .b(k[i-2]), .n(n), .y(k[i]));
  end

endmodule
