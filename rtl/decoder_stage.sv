// Decoder stage: the read path of the Self-Immunity register.
//
// The stored word and its self-pi bit arrive from the register. When self-pi
// is 1 the ECC decoder checks the word and corrects a single upset bit, and
// the multiplexer returns its corrected value; when self-pi is 0 the stored
// word is returned unchanged, without decoding. The result and the decoder's
// flags are captured in an output register on every rising clock edge, so
// `data_out` follows the register contents by one clock. `rst` (active high,
// asynchronous) clears the output register. The decoder-plus-mux structure
// follows the read-path block diagram and the clocked, reset decoder block
// follows the top-level diagram; the status flags are this implementation's
// own addition.
module decoder_stage #(
  parameter int unsigned WORD_W    = selfimm_pkg::WORD_W,
  parameter int unsigned PAYLOAD_W = selfimm_pkg::PAYLOAD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] data,           // stored word
  input  logic              self_pi,        // stored self-pi bit
  output logic [WORD_W-1:0] data_out,       // value read back, registered
  output logic              corrected,      // registered: a single error was repaired
  output logic              uncorrectable   // registered: the ECC found an error it cannot repair
);
  localparam int unsigned R = selfimm_pkg::hamming_r(PAYLOAD_W);

  logic [WORD_W-1:0] decoded;
  logic [WORD_W-1:0] read_value;
  logic [R-1:0]      syndrome_unused;
  logic              corr_c, uncorr_c;

  ecc_decoder #(.WORD_W(WORD_W), .K(PAYLOAD_W)) u_dec (
    .enable       (self_pi),
    .stored       (data),
    .data_out     (decoded),
    .syndrome     (syndrome_unused),
    .corrected    (corr_c),
    .uncorrectable(uncorr_c)
  );

  read_mux #(.WORD_W(WORD_W)) u_rmux (
    .self_pi(self_pi),
    .stored (data),
    .decoded(decoded),
    .data   (read_value)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      data_out      <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      data_out      <= read_value;
      corrected     <= corr_c;
      uncorrectable <= uncorr_c;
    end
  end
endmodule
