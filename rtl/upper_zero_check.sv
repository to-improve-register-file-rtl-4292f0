// Upper-bit checker: decides whether a value written to the register is a
// Self-Immunity case.
//
// It tests whether the upper UPPER_W bits of the incoming word are all zero.
// If they are, the value is representable in the low WORD_W-UPPER_W bits, so
// the upper bits are free to carry its ECC, and `self_pi` is 1. Otherwise
// `self_pi` is 0 and the value is stored unprotected. Purely combinational.
// The 64-bit word and the 12-bit upper field follow the design description.
module upper_zero_check #(
  parameter int unsigned WORD_W  = selfimm_pkg::WORD_W,
  parameter int unsigned UPPER_W = selfimm_pkg::UPPER_W
) (
  input  logic [WORD_W-1:0] data,
  output logic              self_pi   // 1: upper bits all zero, value can be protected
);
  always_comb self_pi = ~|data[WORD_W-1 -: UPPER_W];
endmodule
