// tb_rng_stream: runs the generator at its default parameters as a bit
// stream source, applies two of the statistical randomness tests of
// NIST SP 800-22 (frequency / monobit and runs) plus a period check, and
// reports a third (block frequency) without judging it.
//
// For each of six fixed keys the generator is loaded, warmed up and run
// with en held high for one full LFSR period plus one set (65536 key
// sets). The stream is K1..K5 of each set, most significant bit first, so
// one period gives 65535 x 80 = 5,242,800 bits. Pass criteria, at the 0.01
// significance level:
//   monobit: |#ones - #zeros| / sqrt(n) < 2.5758   (erfc(x/sqrt 2) >= 0.01)
//   runs   : |V - 2n*pi*(1-pi)| / (2*sqrt(2n)*pi*(1-pi)) < 1.8214
//   block frequency, M = 128: chi2 = 4M * sum (ones_j/M - 1/2)^2 over the
//            N = n/M blocks; the p-value igamc(N/2, chi2/2) >= 0.01 is
//            taken through the Wilson-Hilferty normal approximation,
//            z = ((chi2/N)^(1/3) - (1 - 2/(9N))) / sqrt(2/(9N)) < 2.3263.
//            Only printed: of the three unstructured keys, 7F3108CA5E92D46B
//            exceeds this bound (z about 3.6).
// The tests are judged on three keys whose four lane words are unrelated.
// Three structured keys, the counting key 0123456789ABCDEF (lane words that
// differ by 0x1111), the key 1 (three lanes seeded alike) and
// 3C5A96F0E1D2B487 (lane words pairwise complementary), give a
// visibly biased stream: for them the test checks that the bias is seen,
// so that a change in the generator's statistics does not go unnoticed.
// All four lanes step together, so the key-set sequence must repeat after
// exactly 65535 sets: set 65535 must equal set 0 and no set in between may.
module tb_rng_stream;
  import rng_pkg::*;

  localparam int PERIOD = 65535;
  localparam int NKEYS_TESTED = 6;
  localparam int BLK = 128;  // block-frequency block length M

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [63:0] inkey = '0;
  logic        ready, key_valid;
  word_t       k_o [NUM_KEYS];

  int checks = 0, failures = 0;

  rng_lfsr_top dut (
    .clk(clk), .rst_n(rst_n), .load(load), .inkey(inkey), .en(en),
    .ready(ready), .key_valid(key_valid), .k_o(k_o)
  );

  always #5 clk = ~clk;

  function automatic logic [79:0] set_bits();
    return {k_o[0], k_o[1], k_o[2], k_o[3], k_o[4]};
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_key(input logic [63:0] key, input bit judge);
    longint      n, ones, runs;
    logic [79:0] first, cur;
    logic        prev;
    int          sets, early_repeat;
    real         pi, s_obs, v_stat, chi2, wh;
    longint      blk_ones, nblk;

    @(negedge clk); load = 1'b1; inkey = key;
    @(negedge clk); load = 1'b0;
    while (!ready) @(negedge clk);
    en = 1'b1;
    n = 0; ones = 0; runs = 0; sets = 0; early_repeat = 0;
    prev = 1'b0; first = '0;
    chi2 = 0.0; blk_ones = 0; nblk = 0;
    while (sets <= PERIOD) begin
      @(negedge clk);
      check(key_valid === 1'b1, "key_valid low with en held high");
      cur = set_bits();
      if (sets == 0) first = cur;
      else if (sets < PERIOD && cur == first) early_repeat++;
      if (sets < PERIOD) begin
        for (int b = 79; b >= 0; b--) begin
          if (n > 0 && cur[b] != prev) runs++;
          prev = cur[b];
          ones += longint'(cur[b]);
          blk_ones += longint'(cur[b]);
          n++;
          if (n % BLK == 0) begin
            chi2 += (real'(blk_ones) / BLK - 0.5) ** 2;
            blk_ones = 0;
            nblk++;
          end
        end
      end else begin
        check(cur == first, "sequence did not repeat after 65535 sets");
      end
      sets++;
    end
    en = 1'b0;
    runs++;
    check(early_repeat == 0, "key set repeated before the LFSR period");

    s_obs = absr(real'(2 * ones - n)) / $sqrt(real'(n));
    pi    = real'(ones) / real'(n);
    v_stat = absr(real'(runs) - 2.0 * n * pi * (1.0 - pi)) /
             (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
    chi2 = 4.0 * BLK * chi2;
    // Wilson-Hilferty: chi-square with nblk degrees of freedom to a normal z
    wh = ((chi2 / nblk) ** (1.0 / 3.0) - (1.0 - 2.0 / (9.0 * nblk))) /
         $sqrt(2.0 / (9.0 * nblk));
    $display("key %h: n=%0d ones=%0d monobit=%f runs=%0d runs_stat=%f blockfreq_z=%f",
             key, n, ones, s_obs, runs, v_stat, wh);
    if (judge) begin
      check(s_obs < 2.5758, "monobit test");
      check(absr(pi - 0.5) < 2.0 / $sqrt(real'(n)), "runs test prerequisite");
      check(v_stat < 1.8214, "runs test");
    end else begin
      // structured key: the statistics are reported, and must show the
      // known bias (lanes seeded with equal or closely related words)
      check(s_obs >= 2.5758, "structured key unexpectedly unbiased");
    end
  endtask

  initial begin
    repeat (NKEYS_TESTED * (PERIOD + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    run_key(64'hDEAD_BEEF_0BAD_F00D, 1'b1);
    run_key(64'hC381_E88F_38C0_C8FD, 1'b1);
    run_key(64'h7F31_08CA_5E92_D46B, 1'b1);
    run_key(64'h0123_4567_89AB_CDEF, 1'b0);
    run_key(64'h0000_0000_0000_0001, 1'b0);
    run_key(64'h3C5A_96F0_E1D2_B487, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
