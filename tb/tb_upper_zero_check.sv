// Testbench for upper_zero_check: random and corner values; the flag must be
// 1 exactly when bits [63:52] are zero.
module tb_upper_zero_check;
  import tb_ref_pkg::*;
  logic [63:0] data;
  logic        self_pi;
  int checks = 0, failures = 0;

  upper_zero_check dut (.data(data), .self_pi(self_pi));

  task automatic check(input logic [63:0] v);
    data = v;
    #1;
    checks++;
    if (self_pi !== ref_protected(v)) begin
      failures++;
      $display("FAIL data=%h self_pi=%b", v, self_pi);
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
    check('0);
    check('1);
    check(64'h000F_FFFF_FFFF_FFFF);
    for (int b = 0; b < 64; b++) check(64'd1 << b);
    for (int b = 52; b < 64; b++) check(64'h000F_FFFF_FFFF_FFFF | (64'd1 << b));
    for (int n = 0; n < 500; n++) begin
      check(rand_small() | (64'd1 << (52 + n % 12)));   // exactly one upper bit set
      check(rand_word());
      check(rand_small());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
