// tb_rng_lfsr_modes: the end-to-end test of tb_rng_lfsr_top run on the
// generator's other configuration: the bit-shuffle stage bypassed
// (SHUFFLE_EN = 0, whitened words go straight to the scrambler) and a
// warm-up of only 3 LFSR steps. The same cycle model predicts every output.
module tb_rng_lfsr_modes;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  localparam int NUM_OPS = 40;
  localparam int unsigned W = 3;     // short warm-up
  localparam bit          S = 1'b0;  // shuffle stage bypassed

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [63:0] inkey = '0;
  logic        ready, key_valid;
  word_t       k_o [NUM_KEYS];

  int checks = 0, failures = 0;
  int n_load = 0, n_warm_done = 0, n_sets = 0, n_idle_run = 0, n_zero_lane = 0;
  int n_reload_run = 0, n_reload_warm = 0, n_en_in_warm = 0, n_wrap = 0;
  int cyc_since_load;

  rng_model m;

  rng_lfsr_top #(.WARMUP_STEPS(W), .SHUFFLE_EN(S)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .inkey(inkey), .en(en),
    .ready(ready), .key_valid(key_valid), .k_o(k_o)
  );

  always #5 clk = ~clk;

  // Apply inputs for one clock, advance the model, compare after the edge.
  task automatic cycle(input bit ld, input logic [63:0] key, input bit e);
    load = ld; inkey = key; en = e;
    if (ld) begin
      n_load++;
      if (m.state == 2) n_reload_run++;
      if (m.state == 1) n_reload_warm++;
      for (int w = 1; w <= 4; w++) if (ref_pp(key, w) == 16'h0) n_zero_lane++;
    end else if (e && m.state == 1) n_en_in_warm++;
    else if (!e && m.state == 2) n_idle_run++;
    @(posedge clk);
    m.step(ld, key, e);
    @(negedge clk);
    checks++;
    if (ready !== (m.state == 2) || key_valid !== m.valid) begin
      failures++;
      $display("FAIL ready=%b/%b valid=%b/%b", ready, m.state == 2, key_valid, m.valid);
    end
    if (m.valid) begin
      n_sets++;
      if (m.wrapped) n_wrap++;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (k_o[i] !== m.k[i]) begin
          failures++;
          $display("FAIL K%0d=%h exp=%h", i+1, k_o[i], m.k[i]);
        end
      end
    end
  endtask

  function automatic logic [63:0] rand_key();
    logic [63:0] key;
    key = {$urandom, $urandom};
    // one key in four gets an all-zero lane (nibbles p1, p5, p9, p13)
    if ($urandom_range(3) == 0) key &= 64'h0FFF_0FFF_0FFF_0FFF;
    return key;
  endfunction

  task automatic mech(input string name, input int n);
    $display("mechanism %-22s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(W, S);
    #12;
    checks++;
    if (ready !== 1'b0 || key_valid !== 1'b0) begin
      failures++;
      $display("FAIL outputs during reset");
    end
    @(negedge clk);
    rst_n = 1'b1;
    // idle: en does nothing sets0 the first load
    cycle(1'b0, '0, 1'b1);

    // Known key: first key set worked out from the model with the counting
    // key; the warm-up length is measured from the load.
    cycle(1'b1, 64'h0123_4567_89AB_CDEF, 1'b0);
    cyc_since_load = 0;
    while (!ready && cyc_since_load < 100) begin
      cycle(1'b0, '0, cyc_since_load[0]);
      cyc_since_load++;
    end
    checks++;
    if (cyc_since_load != W) begin
      failures++;
      $display("FAIL warm-up took %0d cycles, expected %0d", cyc_since_load, W);
    end
    n_warm_done++;

    for (int op = 0; op < NUM_OPS; op++) begin
      int run_len;
      run_len = $urandom_range(200, 20);
      for (int c = 0; c < run_len; c++) begin
        cycle(1'b0, '0, ($urandom_range(3) != 0));
        if (m.state == 2 && c == 0) n_warm_done++;
      end
      // reload; every third reload lands in the middle of a warm-up
      cycle(1'b1, rand_key(), 1'b0);
      if (op % 3 == 0) begin
        repeat ($urandom_range(W - 2, 1)) cycle(1'b0, '0, 1'b1);
        cycle(1'b1, rand_key(), 1'b1);
      end
      repeat (W) cycle(1'b0, '0, 1'($urandom));
    end

    // sustained rate: one key set per clock with en held high
    begin
      int sets0;
      sets0 = n_sets;
      repeat (100) cycle(1'b0, '0, 1'b1);
      checks++;
      if (n_sets - sets0 != 100) begin
        failures++;
        $display("FAIL rate: %0d sets in 100 cycles", n_sets - sets0);
      end
    end

    mech("load", n_load);
    mech("warm-up completed", n_warm_done);
    mech("key set produced", n_sets);
    mech("en low in run", n_idle_run);
    mech("zero lane seed", n_zero_lane);
    mech("reload during run", n_reload_run);
    mech("reload during warm-up", n_reload_warm);
    mech("en during warm-up", n_en_in_warm);
    mech("modular wrap", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
