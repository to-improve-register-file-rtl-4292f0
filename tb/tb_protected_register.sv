// Testbench for protected_register: reset, load, hold, and bit upsets on
// cycles without a load, against a cycle-by-cycle model.
module tb_protected_register;
  import tb_ref_pkg::*;
  logic        clk = 1'b0, rst, load, d_self_pi, seu_pi, q_self_pi;
  logic [63:0] d_word, seu_mask, q_word;
  logic [63:0] m_word;
  logic        m_pi;
  int checks = 0, failures = 0, cycles = 0;

  protected_register dut (.clk(clk), .rst(rst), .load(load), .d_word(d_word), .d_self_pi(d_self_pi),
                          .seu_mask(seu_mask), .seu_pi(seu_pi), .q_word(q_word), .q_self_pi(q_self_pi));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (q_word !== m_word || q_self_pi !== m_pi) begin
      failures++;
      $display("FAIL q=%h/%b model=%h/%b", q_word, q_self_pi, m_word, m_pi);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b1; d_word = '1; d_self_pi = 1'b1; seu_mask = '0; seu_pi = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    m_word = '0; m_pi = 1'b0;
    compare();                     // reset wins over load
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load      = ($urandom() % 3) == 0;
      d_word    = rand_word();
      d_self_pi = $urandom();
      case ($urandom() % 4)
        0:       seu_mask = 64'd1 << ($urandom() % 64);
        1:       seu_mask = rand_word();
        default: seu_mask = '0;
      endcase
      seu_pi = ($urandom() % 8) == 0;
      @(posedge clk);
      if (load) begin
        m_word = d_word;
        m_pi   = d_self_pi;
      end else begin
        m_word ^= seu_mask;
        m_pi   ^= seu_pi;
      end
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
