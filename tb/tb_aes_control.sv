// tb_aes_control: the round controller. Checks, cycle by cycle, the select
// and enable sequence of an AES-128 block (start edge + 10 rounds = 11
// cycles), that start is ignored while busy, that reset aborts a run, and the
// 12- and 14-round sequences.
module tb_aes_control;
  import aes_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic  step10, step12, step14, busy10, busy12, busy14;
  sel1_e sel1_10, sel1_12, sel1_14;
  sel2_e sel2_10, sel2_12, sel2_14;
  logic [3:0] round10, round12, round14;
  int checks = 0, failures = 0;

  aes_control              dut10 (.clk, .rst, .start, .step_o(step10), .sel1_o(sel1_10), .sel2_o(sel2_10), .round_o(round10), .busy_o(busy10));
  aes_control #(.NR(12))   dut12 (.clk, .rst, .start, .step_o(step12), .sel1_o(sel1_12), .sel2_o(sel2_12), .round_o(round12), .busy_o(busy12));
  aes_control #(.NR(14))   dut14 (.clk, .rst, .start, .step_o(step14), .sel1_o(sel1_14), .sel2_o(sel2_14), .round_o(round14), .busy_o(busy14));

  always #5 clk = ~clk;

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Checks the outputs of one controller for the cycle before edge `cyc`
  // of a run (cyc 0 is the start edge).
  task automatic expect_cycle(int nr, int cyc, logic step, sel1_e s1, sel2_e s2, logic busy, logic [3:0] round);
    sel1_e e1;
    e1 = (cyc == 0) ? SEL1_TEXT : (cyc == nr) ? SEL1_SHIFT : SEL1_MIXCOL;
    expect_bit($sformatf("NR=%0d step c%0d", nr, cyc), step, 1'b1);
    expect_bit($sformatf("NR=%0d busy c%0d", nr, cyc), busy, cyc != 0);
    expect_bit($sformatf("NR=%0d sel1 c%0d", nr, cyc), s1 == e1, 1'b1);
    expect_bit($sformatf("NR=%0d sel2 c%0d", nr, cyc), s2 == ((cyc == 0) ? SEL2_CIPHER_KEY : SEL2_SUB_KEY), 1'b1);
    expect_bit($sformatf("NR=%0d round c%0d", nr, cyc), round == 4'(cyc), 1'b1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_bit("idle busy", busy10, 1'b0);
    expect_bit("idle step", step10, 1'b0);
    start = 1'b1;
    for (int cyc = 0; cyc <= 14; cyc++) begin
      #1;
      if (cyc <= 10) expect_cycle(10, cyc, step10, sel1_10, sel2_10, busy10, round10);
      if (cyc <= 12) expect_cycle(12, cyc, step12, sel1_12, sel2_12, busy12, round12);
      expect_cycle(14, cyc, step14, sel1_14, sel2_14, busy14, round14);
      @(negedge clk);
      start = 1'b0;
      if (cyc == 3) start = 1'b1;   // ignored: controllers are busy
      if (cyc == 4) start = 1'b0;
    end
    // 11 edges after start the AES-128 controller is idle again
    expect_bit("NR=10 idle after 11 cycles", busy10, 1'b0);
    expect_bit("NR=14 idle after 15 cycles", busy14, 1'b0);
    // start, then reset in the middle of the run
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    expect_bit("busy mid-run", busy10, 1'b1);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    expect_bit("busy after reset", busy10, 1'b0);
    expect_bit("step after reset", step10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
