// tb_aes_mix_columns: MixColumns on the FIPS-197 Appendix B round-1 state and
// on random states, compared with the reference model.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] s, o;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_i(s), .state_o(o));

  task automatic check(logic [127:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL MixColumns(%032h) = %032h, expected %032h", s, o, exp);
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
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1
    check(128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 200; i++) begin
      s = rand128(); #1;
      check(mix_columns(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
