// tb_fib_scrambler: checks K1..K5 of the Fibonacci scrambler against the
// reference recurrence, on a hand-worked example and on random Q words.
module tb_fib_scrambler;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  word_t q [LANES];
  word_t k [NUM_KEYS];
  int    checks = 0, failures = 0;
  key5_t exp_k;

  fib_scrambler dut (.q(q), .n(MODULUS), .k(k));

  task automatic check_q(input logic [15:0] q1, input logic [15:0] q2,
                         input logic [15:0] q3, input logic [15:0] q4);
    q[0] = q1; q[1] = q2; q[2] = q3; q[3] = q4;
    #1;
    exp_k = ref_scramble(q1, q2, q3, q4);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (k[i] !== exp_k[i]) begin
        failures++;
        $display("FAIL K%0d=%h exp=%h", i+1, k[i], exp_k[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Q = 1,2,3,4: K = 3, 7, 10, 17, 27
    q[0] = 16'd1; q[1] = 16'd2; q[2] = 16'd3; q[3] = 16'd4;
    #1;
    checks++;
    if (k[0] !== 16'd3 || k[1] !== 16'd7 || k[2] !== 16'd10 || k[3] !== 16'd17 || k[4] !== 16'd27) begin
      failures++;
      $display("FAIL small: %0d %0d %0d %0d %0d", k[0], k[1], k[2], k[3], k[4]);
    end
    // Q = FFFF each: K1 = K2 = 65533, K3 = 65529, K4 = 65525, K5 = 65517
    check_q(16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF);
    checks++;
    if (k[2] !== 16'd65529 || k[4] !== 16'd65517) begin
      failures++;
      $display("FAIL wrap: %0d %0d", k[2], k[4]);
    end
    for (int t = 0; t < 1000; t++)
      check_q(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
