// aes_control: round controller of the iterative AES core.
//
// Idle until start is seen (start while busy is ignored). The clock edge that
// accepts start performs the initial AddRoundKey (Sel 1 = input text, Sel 2 =
// cipher key); the next NR edges perform rounds 1 .. NR (Sel 2 = key-schedule
// register, Sel 1 = MixColumns output, or the ShiftRows output in the final
// round, which has no MixColumns). So a block takes NR+1 clock cycles:
// 11 for AES-128, 13 for AES-192 and 15 for AES-256.
// Interface: step_o enables the state and key registers on every working
// edge; round_o is the round the current edge completes (0 on the start
// edge); busy_o is high from the edge after start until the edge that writes
// the final round, and the result is valid while busy_o is low after that.
// Reset is synchronous and active high.
module aes_control
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       step_o,
  output sel1_e      sel1_o,
  output sel2_e      sel2_o,
  output logic [3:0] round_o,
  output logic       busy_o
);

  typedef enum logic {IDLE, RUN} state_e;

  state_e     state_q;
  logic [3:0] round_q;   // round performed at the next working edge

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      round_q <= 4'd0;
    end else begin
      unique case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          round_q <= 4'd1;
        end
        RUN: begin
          if (round_q == 4'(NR)) begin
            state_q <= IDLE;
            round_q <= 4'd0;
          end else begin
            round_q <= round_q + 4'd1;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy_o  = (state_q == RUN);
    step_o  = busy_o || start;
    round_o = busy_o ? round_q : 4'd0;
    if (!busy_o) begin
      sel1_o = SEL1_TEXT;
      sel2_o = SEL2_CIPHER_KEY;
    end else begin
      sel1_o = (round_q == 4'(NR)) ? SEL1_SHIFT : SEL1_MIXCOL;
      sel2_o = SEL2_SUB_KEY;
    end
  end

  // A run always ends after the final round.
  a_run_ends: assert property (@(posedge clk) disable iff (rst)
    (state_q == RUN && round_q == 4'(NR)) |=> state_q == IDLE);
  // The round counter stays within 1 .. NR while running.
  a_round_range: assert property (@(posedge clk) disable iff (rst)
    state_q == RUN |-> (round_q >= 4'd1 && round_q <= 4'(NR)));

endmodule
