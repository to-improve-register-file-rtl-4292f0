// Self-Immunity register: top level.
//
// A 64-bit register that protects itself against soft errors without extra
// storage. Most values written to a 64-bit register fit in 52 bits; for those
// the 12 unused upper bits are filled with a Hamming ECC of the value and a
// one-bit flag, self-pi, records that the word is protected. Values that need
// more than 52 bits are stored as they are, with self-pi = 0, and are
// unprotected. On the way out, protected words are checked and a single
// flipped bit is corrected; unprotected words bypass the decoder.
//
// The top chains the encoder stage (checker, encoder, mux, register) into the
// decoder stage (decoder, mux, output register), as in the top-level diagram.
// Timing: `input_data` is written on a rising `clock` edge with `load` = 1;
// the value read back appears on `output_data` after the following edge, two
// edges after it was presented. `reset` is active high and asynchronous.
// `seu_mask`/`seu_pi` flip stored bits on an edge with `load` = 0, to model
// soft errors; tie them to zero in normal use. The self-pi output, the status
// flags and the upset inputs are this implementation's additions.
module selfimm_top #(
  parameter int unsigned WORD_W    = selfimm_pkg::WORD_W,
  parameter int unsigned PAYLOAD_W = selfimm_pkg::PAYLOAD_W
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              load,
  input  logic [WORD_W-1:0] input_data,
  input  logic [WORD_W-1:0] seu_mask,
  input  logic              seu_pi,
  output logic [WORD_W-1:0] output_data,
  output logic              self_pi,        // the stored word carries an ECC
  output logic              corrected,      // the last read repaired a single error
  output logic              uncorrectable   // the last read found an unrepairable error
);
  logic [WORD_W-1:0] stored;

  encoder_stage #(.WORD_W(WORD_W), .PAYLOAD_W(PAYLOAD_W)) u_encoder_stage (
    .clk     (clock),
    .rst     (reset),
    .load    (load),
    .data    (input_data),
    .seu_mask(seu_mask),
    .seu_pi  (seu_pi),
    .data_out(stored),
    .self_pi (self_pi)
  );

  decoder_stage #(.WORD_W(WORD_W), .PAYLOAD_W(PAYLOAD_W)) u_decoder_stage (
    .clk          (clock),
    .rst          (reset),
    .data         (stored),
    .self_pi      (self_pi),
    .data_out     (output_data),
    .corrected    (corrected),
    .uncorrectable(uncorrectable)
  );
endmodule
