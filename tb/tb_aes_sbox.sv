// tb_aes_sbox: exhaustive check of the S-box table against the S-box
// computed from its GF(2^8) definition, plus four FIPS-197 entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] a, q;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .q(q));

  task automatic check(logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, q, exp);
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
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      check(sbox(a));
    end
    a = 8'h00; #1 check(8'h63);
    a = 8'h53; #1 check(8'hed);
    a = 8'hff; #1 check(8'h16);
    a = 8'h9a; #1 check(8'hb8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
