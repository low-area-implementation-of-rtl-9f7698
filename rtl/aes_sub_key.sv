// aes_sub_key: one step of the on-the-fly AES key expansion (the "SubKey"
// block of the round loop).
//
// The key schedule is kept as a sliding window of Nk = KEY_BITS/32 words,
// w[i-Nk] .. w[i-1] with w[i-Nk] in the top bits; its top four words are the
// round key of the current round. From the window and the index i of the
// first word still to be generated, this block produces the next four words
// of FIPS-197 KeyExpansion,
//   w[k] = w[k-Nk] ^ f(w[k-1]),
//   f = SubWord(RotWord(.)) ^ Rcon[k/Nk]   when k mod Nk = 0,
//   f = SubWord(.)                         when Nk = 8 and k mod Nk = 4,
//   f = identity                           otherwise,
// and returns the window moved on by four words. One call per clock therefore
// supplies one round key per clock for every key size. Only the word
// positions that can ever need SubWord get S-boxes: position 0 for all key
// sizes, and position 2 as well for 192-bit keys (its four words straddle the
// six-word period). SubWord is applied before the rotation, which gives the
// same result since both act bytewise.
// Interface: win_i (KEY_BITS), widx_i (index i) -> win_o (KEY_BITS).
// Purely combinational.
module aes_sub_key
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic [KEY_BITS-1:0] win_i,
  input  logic [6:0]          widx_i,
  output logic [KEY_BITS-1:0] win_o
);

  localparam int unsigned NK = nk_of(KEY_BITS);

  initial begin
    assert (KEY_BITS == 128 || KEY_BITS == 192 || KEY_BITS == 256)
      else $error("aes_sub_key: KEY_BITS must be 128, 192 or 256");
  end

  for (genvar j = 0; j < 4; j++) begin : g_new
    word_t       prev;     // w[k-1]
    word_t       temp;     // f(w[k-1])
    word_t       w;        // w[k], k = widx_i + j

    if (j == 0) begin : g_first
      assign prev = win_i[31:0];
    end else begin : g_chain
      assign prev = g_new[j-1].w;
    end

    if (j == 0 || (NK == 6 && j == 2)) begin : g_sub
      word_t       sub;
      logic  [6:0] k;
      logic  [6:0] kmod;
      assign k    = widx_i + 7'(j);
      byte_t       rc;
      assign kmod = k % 7'(NK);
      assign rc   = rcon(32'(k) / NK);
      for (genvar b = 0; b < 4; b++) begin : g_sbox
        aes_sbox u_sbox (.a(prev[31-8*b -: 8]), .q(sub[31-8*b -: 8]));
      end
      always_comb begin
        if (kmod == 7'd0)
          temp = {sub[23:0], sub[31:24]} ^ {rc, 24'h0};
        else if (NK > 6 && kmod == 7'd4)
          temp = sub;
        else
          temp = prev;
      end
    end else begin : g_plain
      assign temp = prev;
    end

    assign w = win_i[KEY_BITS-1-32*j -: 32] ^ temp;
  end

  if (NK > 4) begin : g_keep
    assign win_o = {win_i[KEY_BITS-129:0], g_new[0].w, g_new[1].w, g_new[2].w, g_new[3].w};
  end else begin : g_replace
    assign win_o = {g_new[0].w, g_new[1].w, g_new[2].w, g_new[3].w};
  end

endmodule
