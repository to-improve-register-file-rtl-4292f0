// Register with its self-pi bit.
//
// Holds one WORD_W-bit word and the self-pi flag that tells whether that word
// carries an ECC. On a rising clock edge with `load` = 1 both are written.
// `rst` (active high, asynchronous) clears both. To let the protection be
// exercised, a soft error can be modelled: on an edge with `load` = 0 the
// stored word is XORed with `seu_mask` and the flag with `seu_pi`, which flips
// the chosen bits as a particle strike would. With both masks zero the
// register simply holds. The word register, the separate self-pi bit and the
// load signal follow the design description; the reset style and the upset
// inputs are this implementation's choice.
module protected_register #(
  parameter int unsigned WORD_W = selfimm_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [WORD_W-1:0] d_word,
  input  logic              d_self_pi,
  input  logic [WORD_W-1:0] seu_mask,  // bits of the word to upset (when not loading)
  input  logic              seu_pi,    // upset the self-pi bit (when not loading)
  output logic [WORD_W-1:0] q_word,
  output logic              q_self_pi
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_word    <= '0;
      q_self_pi <= 1'b0;
    end else if (load) begin
      q_word    <= d_word;
      q_self_pi <= d_self_pi;
    end else begin
      q_word    <= q_word ^ seu_mask;
      q_self_pi <= q_self_pi ^ seu_pi;
    end
  end
endmodule
