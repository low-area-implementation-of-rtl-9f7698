// tb_aes_ctr_counter: counter-block generation. Checks the SP 800-38A
// counter sequence (f0f1..fcfdfeff onwards), random IVs and steps, and the
// overflow flag around the 2^128 wrap, with 4 blocks and with 7 blocks.
module tb_aes_ctr_counter;
  import aes_ref_pkg::*;

  logic [127:0] iv, step;
  logic [3:0][127:0] ctr4;
  logic [6:0][127:0] ctr7;
  logic ovf4, ovf7;
  int checks = 0, failures = 0;

  aes_ctr_counter                 dut4 (.iv_i(iv), .step_i(step), .ctr_o(ctr4), .overflow_o(ovf4));
  aes_ctr_counter #(.BLOCKS(7))   dut7 (.iv_i(iv), .step_i(step), .ctr_o(ctr7), .overflow_o(ovf7));

  task automatic check_all();
    logic [129:0] sum;
    logic exp4 = 1'b0, exp7 = 1'b0;
    for (int b = 0; b < 7; b++) begin
      sum = 130'(iv) + 130'(step) * 130'(b + 1);
      if (b < 4) begin
        checks++;
        if (ctr4[b] !== sum[127:0]) begin
          failures++;
          $display("FAIL 4-block ctr[%0d] = %032h expected %032h", b, ctr4[b], sum[127:0]);
        end
        exp4 |= |sum[129:128];
      end
      checks++;
      if (ctr7[b] !== sum[127:0]) begin
        failures++;
        $display("FAIL 7-block ctr[%0d] = %032h expected %032h", b, ctr7[b], sum[127:0]);
      end
      exp7 |= |sum[129:128];
    end
    checks += 2;
    if (ovf4 !== exp4 || ovf7 !== exp7) begin
      failures++;
      $display("FAIL overflow %0b/%0b expected %0b/%0b (iv %032h step %032h)", ovf4, ovf7, exp4, exp7, iv, step);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ovf = 0;
  initial begin
    iv = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfefe; step = 128'd1; #1;
    check_all();
    checks += 4;
    if (ctr4[0] !== 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff || ctr4[1] !== 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdff00 ||
        ctr4[2] !== 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdff01 || ctr4[3] !== 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdff02 || ovf4)
      failures++;
    // wrap: the last block of 4 crosses 2^128, the first three do not
    iv = '1 - 128'd3; step = 128'd1; #1;
    check_all();
    checks++;
    if (!ovf4) begin failures++; $display("FAIL no overflow at wrap"); end
    iv = '1 - 128'd4; #1;
    check_all();
    checks++;
    if (ovf4) begin failures++; $display("FAIL overflow one short of wrap"); end
    for (int i = 0; i < 500; i++) begin
      iv = rand128();
      step = (i % 3 == 0) ? rand128() : 128'($urandom_range(1, 1000));
      if (i % 5 == 0) iv = '1 - 128'($urandom_range(0, 5000));
      #1 check_all();
      n_ovf += ovf7;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
