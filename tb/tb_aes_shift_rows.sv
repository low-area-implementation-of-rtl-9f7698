// tb_aes_shift_rows: ShiftRows on the FIPS-197 Appendix B round-1 state and
// on random states, compared with the reference model.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] s, o;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.state_i(s), .state_o(o));

  task automatic check(logic [127:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL ShiftRows(%032h) = %032h, expected %032h", s, o, exp);
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
    s = 128'hd42711aee0bf98f1b8b45de51e415230; #1
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 200; i++) begin
      s = rand128(); #1;
      check(shift_rows(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
