// aes_pkg: types, constants and small GF(2^8) helpers shared by the AES and
// AES-CTR modules.
//
// A 128-bit AES state is kept as a flat vector with byte 0 of the FIPS-197
// input sequence in bits [127:120], so a block prints in the usual test-vector
// order. Byte n sits at row n%4, column n/4 of the 4x4 state matrix.
// The round count follows the standard: 10, 12 or 14 rounds for 128, 192 or
// 256-bit keys. The Rcon constants are a fixed table, as in the reference
// design; the multiply-by-two (xtime) is the fixed GF(2^8) doubling used by
// MixColumns.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Width of the cipher-key port: always the largest key; shorter keys sit in
  // the low bits.
  localparam int unsigned KEY_PORT_BITS = 256;

  // Sel 1: what the AddRoundKey input multiplexer takes.
  typedef enum logic [1:0] {
    SEL1_TEXT   = 2'd0,  // input block (initial round)
    SEL1_MIXCOL = 2'd1,  // MixColumns output (rounds 1 .. Nr-1)
    SEL1_SHIFT  = 2'd2   // ShiftRows output (final round, no MixColumns)
  } sel1_e;

  // Sel 2: where the round key comes from.
  typedef enum logic {
    SEL2_CIPHER_KEY = 1'b0,  // first 128 bits of the cipher key (round 0)
    SEL2_SUB_KEY    = 1'b1   // key-schedule window register (rounds 1 .. Nr)
  } sel2_e;

  function automatic int unsigned nk_of(int unsigned key_bits);
    return key_bits / 32;
  endfunction

  function automatic int unsigned nr_of(int unsigned key_bits);
    return key_bits / 32 + 6;
  endfunction

  // Multiply by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant table, Rcon[i] for i = 1 .. 10 (index 0 unused).
  function automatic byte_t rcon(int unsigned i);
    case (i)
      1:       return 8'h01;
      2:       return 8'h02;
      3:       return 8'h04;
      4:       return 8'h08;
      5:       return 8'h10;
      6:       return 8'h20;
      7:       return 8'h40;
      8:       return 8'h80;
      9:       return 8'h1b;
      10:      return 8'h36;
      default: return 8'h00;
    endcase
  endfunction

endpackage
