// aes_ctr: AES in counter mode (NIST SP 800-38A) over a 128*BLOCKS-bit text,
// with BLOCKS iterative AES cores working in parallel.
//
// On start, aes_ctr_counter derives BLOCKS counter blocks from the IV and the
// IV-base-step (block b gets IV + (b+1)*step), each aes_core encrypts its
// counter block under the common cipher key, and the resulting keystream is
// XORed with the text. Encryption and decryption are the same operation. All
// cores run in lock step, so a whole 512-bit text (the default of four
// blocks) takes the same NR+1 cycles as one AES block: 11 cycles for
// 128-bit keys. Each core has its own key expansion, as in the reference
// design; block count and key size are parameters as there.
// Interface: key is the 256-bit cipher-key port with the key in its low
// KEY_BITS bits; key, iv and iv_step are sampled on the edge that accepts
// start. Text block 0 is in the top 128 bits of plaintext and ciphertext.
// ciphertext is plaintext XOR keystream, formed without a register, so it is
// valid while busy is low after an operation and plaintext is held.
// iv_overflow is registered at start and tells whether a counter of that
// operation wrapped past 2^128. Synchronous active-high reset.
module aes_ctr
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned BLOCKS   = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [KEY_PORT_BITS-1:0] key,
  input  block_t                   iv,
  input  block_t                   iv_step,
  input  logic [128*BLOCKS-1:0]    plaintext,
  output logic [128*BLOCKS-1:0]    ciphertext,
  output logic                     busy,
  output logic                     iv_overflow
);

  block_t [BLOCKS-1:0] ctr;
  block_t [BLOCKS-1:0] keystream;
  logic   [BLOCKS-1:0] core_busy;
  logic                overflow;

  aes_ctr_counter #(.BLOCKS(BLOCKS)) u_counter (
    .iv_i      (iv),
    .step_i    (iv_step),
    .ctr_o     (ctr),
    .overflow_o(overflow)
  );

  for (genvar b = 0; b < BLOCKS; b++) begin : g_core
    aes_core #(.KEY_BITS(KEY_BITS)) u_core (
      .clk    (clk),
      .rst    (rst),
      .start  (start),
      .key_i  (key),
      .block_i(ctr[b]),
      .block_o(keystream[b]),
      .busy_o (core_busy[b])
    );
    assign ciphertext[128*(BLOCKS-b)-1 -: 128] = plaintext[128*(BLOCKS-b)-1 -: 128] ^ keystream[b];
  end

  assign busy = core_busy[0];

  always_ff @(posedge clk) begin
    if (rst)
      iv_overflow <= 1'b0;
    else if (start && !busy)
      iv_overflow <= overflow;
  end

  // The cores share one control sequence and must stay in step.
  a_lock_step: assert property (@(posedge clk) disable iff (rst)
    core_busy == {BLOCKS{core_busy[0]}});

endmodule
