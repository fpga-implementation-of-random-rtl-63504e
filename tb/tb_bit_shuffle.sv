// tb_bit_shuffle: checks the 16-bit shuffle against P(k) = 4k mod 15 on
// every single-bit input, one directed nibble pattern and random words.
module tb_bit_shuffle;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  word_t din, dout;
  int    checks = 0, failures = 0;

  bit_shuffle dut (.din(din), .dout(dout));

  task automatic check_word(input logic [15:0] d);
    din = d;
    #1;
    checks++;
    if (dout !== ref_shuffle(d)) begin
      failures++;
      $display("FAIL din=%h dout=%h exp=%h", d, dout, ref_shuffle(d));
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
    // low nibble spreads to bit 0 of every nibble
    din = 16'h000F;
    #1;
    checks++;
    if (dout !== 16'h1111) begin
      failures++;
      $display("FAIL 000F -> %h", dout);
    end
    for (int k = 0; k < 16; k++) check_word(16'(1) << k);
    for (int t = 0; t < 500; t++) check_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
