// ECC decoder: checks and corrects a word stored in the Self-Immunity case.
//
// It recomputes the Hamming check bits over the stored payload [K-1:0] and
// XORs them with the stored check bits [K+R-1:K] to get the syndrome. A zero
// syndrome means no error. A syndrome equal to a payload position flips that
// payload bit back; a syndrome equal to a power of two points at a check bit,
// so the payload is already correct. A syndrome beyond the codeword length
// (possible only with several upsets) cannot be corrected and is flagged.
// `data_out` is the corrected payload, zero-extended to the word width, which
// is the value originally written. Purely combinational. When `enable`
// (self-pi) is 0 the stored word is forced to zero before the parity trees
// (operand isolation), so no checking activity takes place, `data_out` is
// zero and both flags stay low.
// Decoding only words that carry an ECC follows the design description; the
// Hamming code, the flags, the gating and the layout are this implementation's
// choice.
module ecc_decoder #(
  parameter int unsigned WORD_W = selfimm_pkg::WORD_W,
  parameter int unsigned K      = selfimm_pkg::PAYLOAD_W
) (
  input  logic              enable,       // the word carries an ECC (self-pi = 1)
  input  logic [WORD_W-1:0] stored,       // word as read from the register
  output logic [WORD_W-1:0] data_out,     // corrected value, upper bits zero
  output logic [selfimm_pkg::hamming_r(K)-1:0] syndrome,
  output logic              corrected,    // a single error was found and repaired
  output logic              uncorrectable // syndrome points outside the codeword
);
  localparam int unsigned R = selfimm_pkg::hamming_r(K);

  logic [K+R-1:0] s;   // isolated codeword bits: check bits above, payload below
  logic [K-1:0]   fixed;

  always_comb s = enable ? stored[K+R-1:0] : '0;

  always_comb begin
    int unsigned di;
    syndrome = s[K+R-1:K];
    di       = 0;
    for (int unsigned p = 1; p <= K + R; p++) begin
      if (!selfimm_pkg::is_pow2(p)) begin
        for (int unsigned j = 0; j < R; j++)
          if (p[j]) syndrome[j] ^= s[di];
        di++;
      end
    end
  end

  always_comb begin
    int unsigned di;
    fixed = s[K-1:0];
    di    = 0;
    for (int unsigned p = 1; p <= K + R; p++) begin
      if (!selfimm_pkg::is_pow2(p)) begin
        if (R'(p) == syndrome) fixed[di] = ~s[di];
        di++;
      end
    end
  end

  always_comb begin
    data_out        = '0;
    data_out[K-1:0] = fixed;
    corrected       = (syndrome != '0) && (32'(syndrome) <= K + R);
    uncorrectable   = (32'(syndrome) > K + R);
  end
endmodule
