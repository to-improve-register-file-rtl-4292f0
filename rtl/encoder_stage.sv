// Encoder stage: the write path of the Self-Immunity register.
//
// An incoming 64-bit value goes to the upper-bit checker and to the ECC
// encoder. If its upper 12 bits are zero the checker sets self-pi, which
// activates the encoder, and the multiplexer passes the encoder's word (value
// in the low 52 bits, ECC in the bits above); otherwise the encoder is held
// idle, the raw value is passed and self-pi is 0. The
// chosen word and self-pi are written into the register on a rising edge with
// `load` = 1, so `data_out`/`self_pi` show the new contents one clock after the
// write. `seu_mask`/`seu_pi` model soft errors in the stored bits (see
// protected_register). The structure (checker, encoder, mux, register with a
// self-pi bit) follows the write-path block diagram; the self-pi output port
// is added here so the read stage can see the flag.
module encoder_stage #(
  parameter int unsigned WORD_W    = selfimm_pkg::WORD_W,
  parameter int unsigned PAYLOAD_W = selfimm_pkg::PAYLOAD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [WORD_W-1:0] data,
  input  logic [WORD_W-1:0] seu_mask,
  input  logic              seu_pi,
  output logic [WORD_W-1:0] data_out,  // stored word (encoded or raw)
  output logic              self_pi    // stored self-pi bit
);
  localparam int unsigned UPPER_W = WORD_W - PAYLOAD_W;
  localparam int unsigned R       = selfimm_pkg::hamming_r(PAYLOAD_W);

  logic              pi_next;
  logic [WORD_W-1:0] encoded;
  logic [WORD_W-1:0] word_next;
  logic [R-1:0]      ecc_unused;

  upper_zero_check #(.WORD_W(WORD_W), .UPPER_W(UPPER_W)) u_check (
    .data   (data),
    .self_pi(pi_next)
  );

  ecc_encoder #(.WORD_W(WORD_W), .K(PAYLOAD_W)) u_enc (
    .enable   (pi_next),
    .data     (data),
    .code_word(encoded),
    .ecc      (ecc_unused)
  );

  write_mux #(.WORD_W(WORD_W)) u_wmux (
    .self_pi(pi_next),
    .raw    (data),
    .encoded(encoded),
    .word   (word_next)
  );

  protected_register #(.WORD_W(WORD_W)) u_reg (
    .clk      (clk),
    .rst      (rst),
    .load     (load),
    .d_word   (word_next),
    .d_self_pi(pi_next),
    .seu_mask (seu_mask),
    .seu_pi   (seu_pi),
    .q_word   (data_out),
    .q_self_pi(self_pi)
  );
endmodule
