// Write multiplexer: picks the word that goes into the register.
//
// In the Self-Immunity case (`self_pi` = 1) the encoder's word, value plus
// ECC, is stored; otherwise the raw value is stored unchanged. Purely
// combinational. Both 64-bit inputs and the select by self-pi follow the
// block diagram of the write path.
module write_mux #(
  parameter int unsigned WORD_W = selfimm_pkg::WORD_W
) (
  input  logic              self_pi,
  input  logic [WORD_W-1:0] raw,      // value as written by the instruction
  input  logic [WORD_W-1:0] encoded,  // value with its ECC in the upper bits
  output logic [WORD_W-1:0] word
);
  always_comb word = self_pi ? encoded : raw;
endmodule
