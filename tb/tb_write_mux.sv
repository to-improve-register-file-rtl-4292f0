// Testbench for write_mux: random inputs, both select values.
module tb_write_mux;
  import tb_ref_pkg::*;
  logic        self_pi;
  logic [63:0] raw, encoded, word;
  int checks = 0, failures = 0;

  write_mux dut (.self_pi(self_pi), .raw(raw), .encoded(encoded), .word(word));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      raw     = rand_word();
      encoded = rand_word();
      self_pi = n[0];
      #1;
      checks++;
      if (word !== (n[0] ? encoded : raw)) begin
        failures++;
        $display("FAIL sel=%b word=%h", self_pi, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
