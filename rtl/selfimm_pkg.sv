// Shared constants, types and Hamming-code helpers for the Self-Immunity
// register.
//
// A 64-bit register word is protected "for free" when its value fits in the
// low 52 bits: the upper 12 bits, known to be zero, are reused to hold an
// error-correcting code for the 52-bit value. The 52/12 split and the 64-bit
// word follow the design description; the choice of a single-error-correcting
// Hamming code (6 check bits, leaving the top 6 bits of the word zero) is this
// implementation's own, since only "ECC" is specified.
//
// Codeword layout used everywhere (Hamming positions are 1-based):
//   positions 1,2,4,8,16,32 hold check bits c0..c5,
//   the remaining positions 3,5,6,7,9,... up to 58 hold payload bits 0..51 in order.
// In the stored register word the payload sits in bits [51:0], the check bits
// c0..c5 in bits [57:52], and bits [63:58] are zero.
package selfimm_pkg;

  localparam int unsigned WORD_W    = 64;  // register width
  localparam int unsigned PAYLOAD_W = 52;  // largest value that can be protected
  localparam int unsigned UPPER_W   = WORD_W - PAYLOAD_W;  // 12 bits reused for the ECC

  // Number of Hamming check bits needed to correct one error in k payload bits:
  // smallest r with 2**r >= k + r + 1.
  function automatic int unsigned hamming_r(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  localparam int unsigned ECC_W = hamming_r(PAYLOAD_W);  // 6 for 52 payload bits

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;
  typedef logic [ECC_W-1:0]     ecc_t;

  // True for the check-bit positions 1, 2, 4, 8, ...
  function automatic bit is_pow2(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

endpackage
