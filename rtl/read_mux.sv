// Read multiplexer: picks the value handed back on a register read.
//
// When the stored word carries an ECC (`self_pi` = 1) the decoder's corrected
// value is returned; otherwise the stored word is returned as it is, without
// decoding. Purely combinational. Both 64-bit inputs and the select by self-pi
// follow the block diagram of the read path.
module read_mux #(
  parameter int unsigned WORD_W = selfimm_pkg::WORD_W
) (
  input  logic              self_pi,
  input  logic [WORD_W-1:0] stored,   // word straight from the register
  input  logic [WORD_W-1:0] decoded,  // corrected value from the decoder
  output logic [WORD_W-1:0] data
);
  always_comb data = self_pi ? decoded : stored;
endmodule
