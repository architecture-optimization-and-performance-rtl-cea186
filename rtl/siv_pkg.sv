// siv_pkg: types and helper functions shared by the AES-GCM-SIV engine.
//
// A 128-bit block is held with byte 0 in bits [127:120] and byte 15 in
// bits [7:0], the order in which AES and GCM test vectors are written.
// AES-GCM-SIV (RFC 8452) reads several fields little-endian; the helpers
// below do the byte swaps and the GF(2^128) "multiply by x" that lets the
// GCM multiplier compute POLYVAL. Sizes (AES-128, 96-bit nonce) follow the
// AES-GCM-SIV standard; the length width is this design's own choice.
package siv_pkg;

  typedef logic [127:0] block_t;
  typedef logic [95:0]  nonce_t;

  // Byte lengths of associated data and plaintext.
  localparam int unsigned LEN_W = 16;
  typedef logic [LEN_W-1:0] len_t;

  // What the authentication FSM hands to the encryption FSM for one message.
  typedef struct packed {
    block_t tag;      // authentication tag, also the initial counter
    block_t enc_key;  // per-message encryption key
    len_t   pt_len;   // plaintext length in bytes
    logic   bank;     // buffer bank that holds the plaintext
  } handoff_t;

  // Reverse the 16 bytes of a block.
  function automatic block_t byte_rev(input block_t b);
    block_t r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = b[8*(15-i) +: 8];
    return r;
  endfunction

  // Reverse the bytes of a 32-bit word.
  function automatic logic [31:0] rev32(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  // Reverse the bytes of a 64-bit word.
  function automatic logic [63:0] rev64(input logic [63:0] w);
    return {rev32(w[31:0]), rev32(w[63:32])};
  endfunction

  // Multiply by x in the GCM bit order (bit 127 is the x^0 coefficient).
  function automatic block_t mulx_ghash(input block_t v);
    block_t r;
    r = v >> 1;
    if (v[0]) r[127:120] = r[127:120] ^ 8'hE1;
    return r;
  endfunction

  // Keep the first n bytes of a block (n = 1..16) and clear the rest.
  function automatic block_t keep_bytes(input block_t b, input logic [4:0] n);
    block_t m;
    m = '1;
    if (n < 5'd16) m = ~(m >> (8 * n));
    return b & m;
  endfunction

endpackage
