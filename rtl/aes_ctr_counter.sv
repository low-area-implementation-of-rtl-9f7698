// aes_ctr_counter: counter-block generator of the AES-CTR core.
//
// Counter block b (b = 0 .. BLOCKS-1) is IV + (b+1)*STEP modulo 2^128, built
// as a chain of 128-bit adders, each adding the IV-base-step to the previous
// counter. STEP = 1 gives the usual CTR sequence IV+1, IV+2, ...; the base
// value, the step and the number of blocks are all inputs or parameters.
// overflow_o is high when any of the additions carried out of bit 127, i.e.
// a counter wrapped around and could repeat an earlier counter block under
// the same key. That the first counter is IV + STEP rather than IV itself is
// a reading of the original design's own simulation; the chained adders and
// the carry-based overflow test are this implementation's choice.
// Interface: iv_i, step_i -> ctr_o[b] (block 0 first), overflow_o.
// Purely combinational.
module aes_ctr_counter
  import aes_pkg::*;
#(
  parameter int unsigned BLOCKS = 4
) (
  input  block_t                  iv_i,
  input  block_t                  step_i,
  output block_t [BLOCKS-1:0]     ctr_o,
  output logic                    overflow_o
);

  logic [BLOCKS-1:0] carry;

  for (genvar b = 0; b < BLOCKS; b++) begin : g_ctr
    block_t base;
    if (b == 0) begin : g_first
      assign base = iv_i;
    end else begin : g_next
      assign base = ctr_o[b-1];
    end
    assign {carry[b], ctr_o[b]} = {1'b0, base} + {1'b0, step_i};
  end

  assign overflow_o = |carry;

endmodule
