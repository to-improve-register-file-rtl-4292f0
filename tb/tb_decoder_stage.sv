// Testbench for decoder_stage: presents stored words (protected, possibly with
// one upset bit, or unprotected) and checks the registered read value and
// flags one clock later.
module tb_decoder_stage;
  import tb_ref_pkg::*;
  logic        clk = 1'b0, rst, self_pi, corrected, uncorrectable;
  logic [63:0] data, data_out;
  logic [63:0] exp_out;
  logic        exp_corr;
  int checks = 0, failures = 0, cycles = 0;

  decoder_stage dut (.clk(clk), .rst(rst), .data(data), .self_pi(self_pi), .data_out(data_out),
                     .corrected(corrected), .uncorrectable(uncorrectable));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, flip;
    rst = 1'b1; data = rand_word(); self_pi = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (data_out !== '0 || corrected !== 1'b0 || uncorrectable !== 1'b0) failures++;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      flip = ($urandom() % 2) ? (64'd1 << ($urandom() % 58)) : '0;
      if (n % 3 == 0) begin
        v       = rand_word() | 64'h8000_0000_0000_0000;   // needs more than 52 bits
        self_pi = 1'b0;
        data    = v ^ flip;
        exp_out = data;                                    // no protection: upset stays
        exp_corr = 1'b0;
      end else begin
        v       = rand_small();
        self_pi = 1'b1;
        data    = ref_store(v) ^ flip;
        exp_out = v;
        exp_corr = (flip != '0);
      end
      @(posedge clk);
      #1;
      checks++;
      if (data_out !== exp_out || corrected !== exp_corr || uncorrectable !== 1'b0) begin
        failures++;
        $display("FAIL pi=%b in=%h out=%h exp=%h corr=%b", self_pi, data, data_out, exp_out, corrected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
