// aes_core: iterative AES encryption of one 128-bit block, one round per
// clock cycle, with the key expanded on the fly beside the rounds.
//
// The loop is the classic non-pipelined one: a 128-bit state register feeds
// SubBytes -> ShiftRows -> MixColumns; the Sel 1 multiplexer picks the input
// block (initial round), the MixColumns output (middle rounds) or the
// ShiftRows output (final round) for AddRoundKey, whose result is written
// back into the state register. The round key comes through the Sel 2
// multiplexer, either from the cipher key (initial round) or from the
// key-schedule register RegKey, which the SubKey step (aes_sub_key) moves on
// by four words every cycle. All of this follows the reference
// architecture. Own choices: the key is held as a window of Nk words rather
// than a single round key, so 192- and 256-bit keys need no extra cycles
// beyond their extra rounds.
// Interface: key_i is the 256-bit cipher-key port with the key in its low
// KEY_BITS bits; block_i must be valid on the clock edge that accepts start;
// key_i must be valid on that edge only. block_o holds the ciphertext once
// busy_o has fallen, NR+1 cycles after start, and keeps it until the next
// start. Synchronous active-high reset clears the controller only. Bits of
// key_i above KEY_BITS are not used (the port is sized for the longest key).
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [KEY_PORT_BITS-1:0] key_i,
  input  block_t                   block_i,
  output block_t                   block_o,
  output logic                     busy_o
);

  localparam int unsigned NK = nk_of(KEY_BITS);
  localparam int unsigned NR = nr_of(KEY_BITS);

  logic       step;
  logic [3:0] round;
  sel1_e      sel1;
  sel2_e      sel2;

  block_t              state_q;
  logic [KEY_BITS-1:0] regkey_q;
  logic [6:0]          widx_q;

  block_t              sub_bytes, shift_rows, mix_columns, ark_in, ark_out, round_key;
  logic [KEY_BITS-1:0] key_win, key_win_next;
  logic [6:0]          widx;

  aes_control #(.NR(NR)) u_control (
    .clk    (clk),
    .rst    (rst),
    .start  (start),
    .step_o (step),
    .sel1_o (sel1),
    .sel2_o (sel2),
    .round_o(round),
    .busy_o (busy_o)
  );

  aes_sub_bytes   u_sub_bytes   (.state_i(state_q),    .state_o(sub_bytes));
  aes_shift_rows  u_shift_rows  (.state_i(sub_bytes),  .state_o(shift_rows));
  aes_mix_columns u_mix_columns (.state_i(shift_rows), .state_o(mix_columns));

  // Sel 1
  always_comb begin
    unique case (sel1)
      SEL1_TEXT:   ark_in = block_i;
      SEL1_MIXCOL: ark_in = mix_columns;
      SEL1_SHIFT:  ark_in = shift_rows;
      default:     ark_in = block_i;
    endcase
  end

  // Sel 2
  always_comb begin
    if (sel2 == SEL2_CIPHER_KEY) begin
      key_win = key_i[KEY_BITS-1:0];
      widx    = 7'(NK);
    end else begin
      key_win = regkey_q;
      widx    = widx_q;
    end
  end
  assign round_key = key_win[KEY_BITS-1 -: 128];

  aes_add_round_key u_add_round_key (.state_i(ark_in), .round_key_i(round_key), .state_o(ark_out));

  aes_sub_key #(.KEY_BITS(KEY_BITS)) u_sub_key (
    .win_i (key_win),
    .widx_i(widx),
    .win_o (key_win_next)
  );

  // Reg and RegKey
  always_ff @(posedge clk) begin
    if (step) begin
      state_q  <= ark_out;
      regkey_q <= key_win_next;
      widx_q   <= widx + 7'd4;
    end
  end

  assign block_o = state_q;

  // MixColumns is bypassed in the final round and only there.
  a_final_round: assert property (@(posedge clk) disable iff (rst)
    step |-> ((sel1 == SEL1_SHIFT) == (round == 4'(NR))));

endmodule
