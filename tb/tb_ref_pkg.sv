// Reference model for the testbenches of the Self-Immunity register.
//
// It computes the expected Hamming check bits in a different way from the
// RTL: a correct codeword is one in which the XOR of the 1-based positions of
// all its 1 bits is zero, so the check-bit vector equals the XOR of the
// positions of the payload bits that are 1. Payload bit i sits at the i-th
// position that is not a power of two (3, 5, 6, 7, 9, ...).
package tb_ref_pkg;
  localparam int WORD_W = 64;
  localparam int K      = 52;
  localparam int R      = 6;

  // Position of payload bit i in the codeword.
  function automatic int pos_of(input int i);
    int p, n;
    n = -1;
    p = 0;
    while (n < i) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  function automatic logic [R-1:0] ref_ecc(input logic [K-1:0] d);
    logic [R-1:0] s;
    s = '0;
    for (int i = 0; i < K; i++) if (d[i]) s ^= R'(pos_of(i));
    return s;
  endfunction

  // The word the write path should store for value v.
  function automatic logic [WORD_W-1:0] ref_store(input logic [WORD_W-1:0] v);
    if (v[WORD_W-1:K] == '0) return {{(WORD_W-K-R){1'b0}}, ref_ecc(v[K-1:0]), v[K-1:0]};
    return v;
  endfunction

  function automatic logic ref_protected(input logic [WORD_W-1:0] v);
    return v[WORD_W-1:K] == '0;
  endfunction

  // Stored-word bit index of 1-based codeword position p.
  function automatic int word_bit_of_pos(input int p);
    if ((p & (p - 1)) == 0) begin
      for (int j = 0; j < R; j++) if (p == (1 << j)) return K + j;
    end
    for (int i = 0; i < K; i++) if (pos_of(i) == p) return i;
    return -1;
  endfunction

  function automatic logic [WORD_W-1:0] rand_word();
    return {$urandom(), $urandom()};
  endfunction

  // Random value that fits in K bits, with a random number of leading zeros.
  function automatic logic [WORD_W-1:0] rand_small();
    logic [WORD_W-1:0] v;
    v = rand_word();
    v = v >> (WORD_W - K + ($urandom() % K));
    return v;
  endfunction
endpackage
