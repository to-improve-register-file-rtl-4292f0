// Testbench for ecc_encoder: compares the check bits and the full code word
// with a reference built from codeword positions, for single-bit, corner and
// random payloads, checks that upper input bits do not leak through, and
// that a disabled encoder outputs zero.
module tb_ecc_encoder;
  import tb_ref_pkg::*;
  logic        enable;
  logic [63:0] data, code_word;
  logic [5:0]  ecc;
  int checks = 0, failures = 0;

  ecc_encoder dut (.enable(enable), .data(data), .code_word(code_word), .ecc(ecc));

  task automatic check(input logic [63:0] v, input logic en = 1'b1);
    logic [63:0] exp;
    enable = en;
    data   = v;
    #1;
    exp = en ? {6'b0, ref_ecc(v[51:0]), v[51:0]} : '0;
    checks++;
    if (code_word !== exp || ecc !== exp[57:52]) begin
      failures++;
      $display("FAIL data=%h code_word=%h expected=%h", v, code_word, exp);
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
    check(64'h000F_FFFF_FFFF_FFFF);
    for (int b = 0; b < 52; b++) check(64'd1 << b);
    for (int n = 0; n < 500; n++) begin
      check(rand_small());
      check(rand_word());   // upper bits must be ignored
      check(rand_word(), 1'b0);  // idle encoder outputs zero
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
