// tb_aplusbmodn: checks y = (a + b) mod n with n = 65537 on the corner sums
// (0, 65535, 65536, 65537, 131070) and random operands, then with random
// moduli and n = 0.
module tb_aplusbmodn;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  word_t a, b, y;
  mod_t  n;
  int    checks = 0, failures = 0;

  aplusbmodn dut (.a(a), .b(b), .n(n), .y(y));

  task automatic check_add(input logic [15:0] ta, input logic [15:0] tb, input logic [16:0] tn);
    a = ta; b = tb; n = tn;
    #1;
    checks++;
    if (y !== ref_addmod(ta, tb, tn)) begin
      failures++;
      $display("FAIL a=%0d b=%0d n=%0d y=%0d exp=%0d", ta, tb, tn, y, ref_addmod(ta, tb, tn));
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
    // directed values worked out by hand for n = 65537
    a = 16'hFFFF; b = 16'hFFFF; n = 17'h10001; #1;   // 131070 - 65537 = 65533
    checks++; if (y !== 16'd65533) begin failures++; $display("FAIL max sum %0d", y); end
    a = 16'h8000; b = 16'h8001; #1;                   // 65537 -> 0
    checks++; if (y !== 16'd0) begin failures++; $display("FAIL 65537 %0d", y); end
    a = 16'h8000; b = 16'h8002; #1;                   // 65538 -> 1
    checks++; if (y !== 16'd1) begin failures++; $display("FAIL 65538 %0d", y); end
    a = 16'h1234; b = 16'h0100; #1;                   // no wrap
    checks++; if (y !== 16'h1334) begin failures++; $display("FAIL small %h", y); end

    check_add(16'd0, 16'd0, 17'h10001);
    check_add(16'hFFFF, 16'd0, 17'h10001);
    check_add(16'h8000, 16'h8000, 17'h10001);
    for (int t = 0; t < 1000; t++) check_add(16'($urandom), 16'($urandom), 17'h10001);
    for (int t = 0; t < 500; t++)  check_add(16'($urandom), 16'($urandom), 17'($urandom));
    check_add(16'h1234, 16'h4321, 17'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
