// Testbench for read_mux: random inputs, both select values.
module tb_read_mux;
  import tb_ref_pkg::*;
  logic        self_pi;
  logic [63:0] stored, decoded, data;
  int checks = 0, failures = 0;

  read_mux dut (.self_pi(self_pi), .stored(stored), .decoded(decoded), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      stored  = rand_word();
      decoded = rand_word();
      self_pi = n[1];
      #1;
      checks++;
      if (data !== (n[1] ? decoded : stored)) begin
        failures++;
        $display("FAIL sel=%b data=%h", self_pi, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
