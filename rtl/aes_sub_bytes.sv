// aes_sub_bytes: the SubBytes transformation, sixteen S-box lookups applied
// byte by byte to a 128-bit state. Purely combinational.
// Interface: state_i -> state_o, byte 0 in bits [127:120].
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_sbox u_sbox (
      .a(state_i[127-8*n -: 8]),
      .q(state_o[127-8*n -: 8])
    );
  end

endmodule
