// End-to-end testbench for selfimm_top at its default size (64-bit register,
// 52-bit protected payload).
//
// Each operation writes a value, optionally lets a soft error strike the
// stored word, and reads the value back. It checks: the read value and the
// self-pi output against a reference, the two-edge write-to-read latency, that
// single upsets of protected words (payload, check bits or unused top bits) are
// undone and flagged, that upsets of unprotected words are passed through
// unchanged, that out-of-range double upsets are flagged as uncorrectable, that
// the register holds without a load, and that reset clears the output. Each of
// these mechanisms is counted and must occur at least once.
module tb_selfimm_top;
  import tb_ref_pkg::*;
  logic        clock = 1'b0, reset, load, seu_pi;
  logic [63:0] input_data, seu_mask, output_data;
  logic        self_pi, corrected, uncorrectable;
  int checks = 0, failures = 0, cycles = 0;
  int n_prot = 0, n_raw = 0, n_fix_payload = 0, n_fix_check = 0, n_unused = 0;
  int n_raw_upset = 0, n_uncorr = 0, n_hold = 0, n_latency = 0;

  selfimm_top dut (.clock(clock), .reset(reset), .load(load), .input_data(input_data),
                   .seu_mask(seu_mask), .seu_pi(seu_pi), .output_data(output_data),
                   .self_pi(self_pi), .corrected(corrected), .uncorrectable(uncorrectable));

  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] exp_out, input logic exp_pi,
                       input logic exp_corr, input logic exp_unc);
    checks++;
    if (output_data !== exp_out || self_pi !== exp_pi || corrected !== exp_corr ||
        uncorrectable !== exp_unc) begin
      failures++;
      $display("FAIL %s: out=%h pi=%b corr=%b unc=%b, expected %h %b %b %b", what,
               output_data, self_pi, corrected, uncorrectable, exp_out, exp_pi, exp_corr, exp_unc);
    end
  endtask

  // One operation: write v, apply upset `flip` (0 for none), read back.
  task automatic op(input logic [63:0] v, input logic [63:0] flip,
                    input logic [63:0] exp_out, input logic exp_corr, input logic exp_unc);
    logic [63:0] prev_out;
    logic        prot;
    prot = ref_protected(v);
    prev_out = output_data;
    @(negedge clock);
    load = 1'b1; input_data = v; seu_mask = '0;
    @(posedge clock);                              // edge 1: value stored
    #1;
    checks++;                                      // read path has not caught up yet
    if (output_data !== prev_out) begin
      failures++;
      $display("FAIL latency: output changed one edge after the write");
    end
    if (prev_out != v) n_latency++;
    @(negedge clock);
    load = 1'b0; input_data = rand_word();
    @(posedge clock);                              // edge 2: value read out
    #1;
    check("clean read", v, prot, 1'b0, 1'b0);
    if (flip != '0) begin
      @(negedge clock);
      seu_mask = flip;
      @(posedge clock);                            // upset lands in the register
      @(negedge clock);
      seu_mask = '0;
      @(posedge clock);                            // upset word read out
      #1;
      check("read after upset", exp_out, prot, exp_corr, exp_unc);
      // Holding: another cycle without load reads the same
      @(posedge clock);
      #1;
      check("hold", exp_out, prot, exp_corr, exp_unc);
      n_hold++;
    end
  endtask

  initial begin
    logic [63:0] v, f;
    int p1, p2;
    reset = 1'b1; load = 1'b0; input_data = '0; seu_mask = '0; seu_pi = 1'b0;
    repeat (2) @(posedge clock);
    #1;
    check("reset", '0, 1'b0, 1'b0, 1'b0);
    @(negedge clock) reset = 1'b0;

    for (int n = 0; n < 600; n++) begin
      case (n % 6)
        0: begin                                   // protected, clean
          v = rand_small(); op(v, '0, v, 1'b0, 1'b0); n_prot++;
        end
        1: begin                                   // unprotected, clean
          v = rand_word() | (64'd1 << (52 + $urandom() % 12)); op(v, '0, v, 1'b0, 1'b0); n_raw++;
        end
        2: begin                                   // protected, payload upset
          v = rand_small(); f = 64'd1 << ($urandom() % 52);
          op(v, f, v, 1'b1, 1'b0); n_prot++; n_fix_payload++;
        end
        3: begin                                   // protected, check-bit or unused-bit upset
          v = rand_small();
          if (n % 12 == 3) begin
            f = 64'd1 << (52 + $urandom() % 6); op(v, f, v, 1'b1, 1'b0); n_fix_check++;
          end else begin
            f = 64'd1 << (58 + $urandom() % 6); op(v, f, v, 1'b0, 1'b0); n_unused++;
          end
          n_prot++;
        end
        4: begin                                   // unprotected, upset passes through
          v = rand_word() | 64'h8000_0000_0000_0000; f = 64'd1 << ($urandom() % 64);
          op(v, f, v ^ f, 1'b0, 1'b0); n_raw++; n_raw_upset++;
        end
        default: begin                             // protected, out-of-range double upset
          do begin
            p1 = 1 + $urandom() % 58;
            p2 = 1 + $urandom() % 58;
          end while ((p1 ^ p2) <= 58);
          v = rand_small();
          f = (64'd1 << word_bit_of_pos(p1)) | (64'd1 << word_bit_of_pos(p2));
          @(negedge clock);
          load = 1'b1; input_data = v;
          @(negedge clock);
          load = 1'b0; seu_mask = f;
          @(negedge clock);
          seu_mask = '0;
          @(posedge clock);
          #1;
          checks++;
          if (uncorrectable !== 1'b1 || corrected !== 1'b0 || self_pi !== 1'b1) begin
            failures++;
            $display("FAIL double upset not flagged p1=%0d p2=%0d", p1, p2);
          end
          n_uncorr++; n_prot++;
        end
      endcase
    end

    // Reset in the middle of operation clears everything.
    @(negedge clock) reset = 1'b1;
    #1;
    check("async reset", '0, 1'b0, 1'b0, 1'b0);
    @(negedge clock) reset = 1'b0;

    $display("mechanisms: protected=%0d unprotected=%0d payload_fix=%0d check_fix=%0d unused_upset=%0d raw_upset=%0d uncorrectable=%0d hold=%0d latency=%0d",
             n_prot, n_raw, n_fix_payload, n_fix_check, n_unused, n_raw_upset, n_uncorr, n_hold, n_latency);
    if (n_prot == 0)        begin failures++; $display("FAIL never: protected write"); end
    if (n_raw == 0)         begin failures++; $display("FAIL never: unprotected write"); end
    if (n_fix_payload == 0) begin failures++; $display("FAIL never: payload correction"); end
    if (n_fix_check == 0)   begin failures++; $display("FAIL never: check-bit correction"); end
    if (n_unused == 0)      begin failures++; $display("FAIL never: unused-bit upset"); end
    if (n_raw_upset == 0)   begin failures++; $display("FAIL never: unprotected upset"); end
    if (n_uncorr == 0)      begin failures++; $display("FAIL never: uncorrectable upset"); end
    if (n_hold == 0)        begin failures++; $display("FAIL never: hold"); end
    if (n_latency == 0)     begin failures++; $display("FAIL never: latency observed"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
