// aes_shift_rows: the ShiftRows transformation. Row r of the 4x4 state is
// rotated left by r byte positions, so output byte (r,c) is input byte
// (r,(c+r) mod 4). Only wiring; purely combinational.
// Interface: state_i -> state_o, byte n = row n%4, column n/4, byte 0 in
// bits [127:120].
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_o[127-8*(r+4*c) -: 8] = state_i[127-8*(r+4*((c+r)%4)) -: 8];
    end
  end

endmodule
