// tb_aes_add_round_key: AddRoundKey on the FIPS-197 Appendix B round-1 state
// and on random states and keys.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  logic [127:0] s, k, o;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_i(s), .round_key_i(k), .state_o(o));

  task automatic check(logic [127:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL AddRoundKey(%032h, %032h) = %032h, expected %032h", s, k, o, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 128'h046681e5e0cb199a48f8d37a2806264c;
    k = 128'ha0fafe1788542cb123a339392a6c7605; #1
    check(128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 100; i++) begin
      s = rand128(); k = rand128(); #1;
      check(s ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
