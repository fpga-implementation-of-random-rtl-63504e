// tb_key_partition: checks the nibble regrouping of the 64-bit key against
// the reference model, on a fixed key whose nibbles count 0..F and on
// random keys. Combinational; a watchdog bounds the run.
module tb_key_partition;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  logic [63:0] inkey;
  word_t       pp [LANES];
  int          checks = 0, failures = 0;

  key_partition dut (.inkey(inkey), .pp(pp));

  task automatic check_key(input logic [63:0] key);
    inkey = key;
    #1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (pp[w] !== ref_pp(key, w+1)) begin
        failures++;
        $display("FAIL key=%h pp%0d=%h exp=%h", key, w+1, pp[w], ref_pp(key, w+1));
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
    // p1..p16 = 0..F: pp1 = 048C, pp2 = 159D, pp3 = 26AE, pp4 = 37BF
    inkey = 64'h0123_4567_89AB_CDEF;
    #1;
    checks++;
    if (pp[0] !== 16'h048C || pp[1] !== 16'h159D || pp[2] !== 16'h26AE || pp[3] !== 16'h37BF) begin
      failures++;
      $display("FAIL counting key: %h %h %h %h", pp[0], pp[1], pp[2], pp[3]);
    end
    for (int t = 0; t < 500; t++) check_key({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
