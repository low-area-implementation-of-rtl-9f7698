// aes_mix_columns: the MixColumns transformation. Each column is multiplied
// by the fixed matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] over GF(2^8);
// multiplication by 2 is the fixed xtime function and by 3 is xtime(b)^b.
// Purely combinational.
// Interface: state_i -> state_o, byte 0 in bits [127:120].
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t s0, s1, s2, s3;
    assign s0 = state_i[127-32*c -: 8];
    assign s1 = state_i[119-32*c -: 8];
    assign s2 = state_i[111-32*c -: 8];
    assign s3 = state_i[103-32*c -: 8];
    assign state_o[127-32*c -: 8] = xtime(s0) ^ (xtime(s1) ^ s1) ^ s2 ^ s3;
    assign state_o[119-32*c -: 8] = s0 ^ xtime(s1) ^ (xtime(s2) ^ s2) ^ s3;
    assign state_o[111-32*c -: 8] = s0 ^ s1 ^ xtime(s2) ^ (xtime(s3) ^ s3);
    assign state_o[103-32*c -: 8] = (xtime(s0) ^ s0) ^ s1 ^ s2 ^ xtime(s3);
  end

endmodule
