// Testbench for ecc_decoder: every single-bit upset of a correctly encoded
// word must be undone and flagged as corrected; upsets in the unused top bits
// must not disturb the value; clean words must pass with no flag; a disabled
// decoder must output zero with both flags low; double upsets whose syndrome falls outside
// the codeword must be flagged as uncorrectable.
module tb_ecc_decoder;
  import tb_ref_pkg::*;
  logic        enable;
  logic [63:0] stored, data_out;
  logic [5:0]  syndrome;
  logic        corrected, uncorrectable;
  int checks = 0, failures = 0, n_uncorr = 0;

  ecc_decoder dut (.enable(enable), .stored(stored), .data_out(data_out),
                   .syndrome(syndrome), .corrected(corrected), .uncorrectable(uncorrectable));

  task automatic expect_ok(input logic [63:0] v, input logic [63:0] flip,
                           input logic exp_corr, input logic en);
    enable = en;
    stored = ref_store(v) ^ flip;
    #1;
    checks++;
    if (data_out !== (en ? v : 64'd0) || corrected !== (en & exp_corr) || uncorrectable !== 1'b0) begin
      failures++;
      $display("FAIL v=%h flip=%h out=%h corr=%b unc=%b", v, flip, data_out, corrected, uncorrectable);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    for (int n = 0; n < 60; n++) begin
      v = (n == 0) ? 64'd0 : (n == 1) ? 64'h000F_FFFF_FFFF_FFFF : rand_small();
      expect_ok(v, '0, 1'b0, 1'b1);
      for (int p = 1; p <= 58; p++) expect_ok(v, 64'd1 << word_bit_of_pos(p), 1'b1, 1'b1);
      for (int b = 58; b < 64; b++) expect_ok(v, 64'd1 << b, 1'b0, 1'b1);
      expect_ok(v, 64'd1 << ($urandom() % 58), 1'b1, 1'b0);  // disabled decoder is idle
    end
    // Double upsets: positions whose XOR exceeds 58 give an out-of-range syndrome.
    for (int n = 0; n < 200; n++) begin
      int p1, p2;
      v  = rand_small();
      p1 = 1 + ($urandom() % 58);
      p2 = 1 + ($urandom() % 58);
      if ((p1 ^ p2) > 58) begin
        enable = 1'b1;
        stored = ref_store(v) ^ (64'd1 << word_bit_of_pos(p1)) ^ (64'd1 << word_bit_of_pos(p2));
        #1;
        checks++;
        n_uncorr++;
        if (uncorrectable !== 1'b1 || corrected !== 1'b0 || syndrome !== 6'(p1 ^ p2)) begin
          failures++;
          $display("FAIL double p1=%0d p2=%0d unc=%b syn=%0d", p1, p2, uncorrectable, syndrome);
        end
      end
    end
    checks++;
    if (n_uncorr == 0) begin
      failures++;
      $display("FAIL no uncorrectable case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
