// Testbench for encoder_stage: writes protected and unprotected values and
// checks the stored word and self-pi one clock later against the reference
// encoding; checks that the register holds when load is low.
module tb_encoder_stage;
  import tb_ref_pkg::*;
  logic        clk = 1'b0, rst, load, seu_pi, self_pi;
  logic [63:0] data, seu_mask, data_out;
  logic [63:0] exp_word;
  logic        exp_pi;
  int checks = 0, failures = 0, cycles = 0, n_prot = 0, n_raw = 0;

  encoder_stage dut (.clk(clk), .rst(rst), .load(load), .data(data), .seu_mask(seu_mask),
                     .seu_pi(seu_pi), .data_out(data_out), .self_pi(self_pi));

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
    rst = 1'b1; load = 1'b0; data = '0; seu_mask = '0; seu_pi = 1'b0;
    exp_word = '0; exp_pi = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load = ($urandom() % 4) != 0;
      data = (n % 2 == 0) ? rand_small() : rand_word();
      if (n == 3) data = 64'h000F_FFFF_FFFF_FFFF;
      if (n == 5) data = 64'h0010_0000_0000_0000;
      @(posedge clk);
      if (load) begin
        exp_word = ref_store(data);
        exp_pi   = ref_protected(data);
        if (exp_pi) n_prot++; else n_raw++;
      end
      #1;
      checks++;
      if (data_out !== exp_word || self_pi !== exp_pi) begin
        failures++;
        $display("FAIL data=%h stored=%h/%b expected=%h/%b", data, data_out, self_pi, exp_word, exp_pi);
      end
    end
    checks++;
    if (n_prot == 0 || n_raw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
