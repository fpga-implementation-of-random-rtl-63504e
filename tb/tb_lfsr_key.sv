// tb_lfsr_key: checks the 16-bit lane LFSR against the reference feedback
// x^16 + x^14 + x^13 + x^11 + 1: reset value, load, the zero-seed guard,
// hold with step low, load priority over step, random stepping, and the
// full period of 65535 steps from seed 1 (no earlier repeat).
module tb_lfsr_key;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [15:0] key_in = '0, key_out, model;
  int          checks = 0, failures = 0;
  int          period;

  lfsr_key dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step),
                .key_in(key_in), .key_out(key_out));

  always #5 clk = ~clk;

  task automatic expect_state(input logic [15:0] e, input string what);
    checks++;
    if (key_out !== e) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, key_out, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    expect_state(16'h0001, "reset value");
    rst_n = 1'b1;

    // load a seed, then step once: 0xACE1 -> {0x59C2, fb}
    @(negedge clk); load = 1'b1; key_in = 16'hACE1;
    @(negedge clk); load = 1'b0;
    expect_state(16'hACE1, "load");
    step = 1'b1;
    @(negedge clk); step = 1'b0;
    // fb = b15^b13^b12^b10 of ACE1 = 1^1^0^1 = 1 -> 59C3
    expect_state(16'h59C3, "one step");

    // hold
    repeat (3) @(negedge clk);
    expect_state(16'h59C3, "hold");

    // zero seed guard
    load = 1'b1; key_in = 16'h0000;
    @(negedge clk); load = 1'b0;
    expect_state(16'h0001, "zero seed");

    // load wins over step
    load = 1'b1; step = 1'b1; key_in = 16'h1234;
    @(negedge clk); load = 1'b0;
    expect_state(16'h1234, "load priority");

    // random stepping against the model
    model = 16'h1234;
    for (int t = 0; t < 2000; t++) begin
      step = 1'($urandom);
      @(negedge clk);
      if (step) model = ref_lfsr_next(model);
      expect_state(model, "random step");
    end
    step = 1'b0;

    // period from seed 1
    load = 1'b1; key_in = 16'h0001;
    @(negedge clk); load = 1'b0; step = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (key_out != 16'h0001 && period < 70000);
    step = 1'b0;
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d", period);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
