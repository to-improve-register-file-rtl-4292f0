// ECC encoder: builds the protected register word for a Self-Immunity value.
//
// The low K bits of `data` are the payload. A single-error-correcting Hamming
// code over those K bits gives R check bits (R = 6 for K = 52). Payload bit i
// occupies the i-th non-power-of-two position of a 1-based codeword of length
// K+R; check bit j is the XOR of every payload bit whose position has bit j
// set. The output word carries the payload in [K-1:0], the check bits in
// [K+R-1:K] and zeros above. Bits of `data` above K are ignored: the caller
// only selects this word when they are zero. When `enable` is 0 the data
// input is forced to zero before the parity trees (operand isolation), so the
// encoder does not switch for values that will be stored unprotected and
// `code_word` is zero. Purely combinational.
// The 52-bit payload and 64-bit output width follow the design description;
// Skipping ECC generation for unprotected values follows the description;
// the Hamming code, the bit layout and the gating are this implementation's choice.
module ecc_encoder #(
  parameter int unsigned WORD_W = selfimm_pkg::WORD_W,
  parameter int unsigned K      = selfimm_pkg::PAYLOAD_W
) (
  input  logic              enable,     // self-pi of the value: generate the ECC
  input  logic [WORD_W-1:0] data,       // value to protect; only [K-1:0] used
  output logic [WORD_W-1:0] code_word,  // {zeros, check bits, payload}
  output logic [selfimm_pkg::hamming_r(K)-1:0] ecc  // the check bits alone
);
  localparam int unsigned R = selfimm_pkg::hamming_r(K);

  logic [K-1:0] d;
  always_comb d = enable ? data[K-1:0] : '0;

  always_comb begin
    int unsigned di;
    ecc = '0;
    di  = 0;
    for (int unsigned p = 1; p <= K + R; p++) begin
      if (!selfimm_pkg::is_pow2(p)) begin
        for (int unsigned j = 0; j < R; j++)
          if (p[j]) ecc[j] ^= d[di];
        di++;
      end
    end
  end

  always_comb begin
    code_word          = '0;
    code_word[K-1:0]   = d;
    code_word[K+R-1:K] = ecc;
  end
endmodule
