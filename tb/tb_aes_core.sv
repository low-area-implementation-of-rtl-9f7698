// tb_aes_core: the iterative AES core for 128-, 192- and 256-bit keys.
// Encrypts the FIPS-197 Appendix C example vectors and random blocks and
// keys (expected values from the reference model), checks that a block takes
// exactly Nr+1 cycles (11, 13, 15) from the start edge until busy falls, that
// the result is held afterwards, and that start while busy is ignored.
module tb_aes_core;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [255:0] key128, key192, key256;
  logic [127:0] blk, out128, out192, out256;
  logic busy128, busy192, busy256;
  int checks = 0, failures = 0;

  aes_core                     dut128 (.clk, .rst, .start, .key_i(key128), .block_i(blk), .block_o(out128), .busy_o(busy128));
  aes_core #(.KEY_BITS(192))   dut192 (.clk, .rst, .start, .key_i(key192), .block_i(blk), .block_o(out192), .busy_o(busy192));
  aes_core #(.KEY_BITS(256))   dut256 (.clk, .rst, .start, .key_i(key256), .block_i(blk), .block_o(out256), .busy_o(busy256));

  always #5 clk = ~clk;

  task automatic expect128(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Runs one block through all three cores; returns with the results stable.
  // With `poke` set, start is raised again in the middle of the run.
  task automatic run(logic [127:0] pt, logic [255:0] k1, logic [255:0] k2, logic [255:0] k3, bit poke);
    int n128 = 0, n192 = 0, n256 = 0;
    blk = pt; key128 = k1; key192 = k2; key256 = k3;
    start = 1'b1;
    for (int cyc = 1; cyc <= 20; cyc++) begin
      @(posedge clk); #1;
      start = (poke && cyc == 4);
      if (cyc == 2) begin   // inputs need only be valid on the start edge
        blk = rand128(); key128 = {rand128(), rand128()}; key192 = key128; key256 = key128;
      end
      if (busy128) n128 = cyc;
      if (busy192) n192 = cyc;
      if (busy256) n256 = cyc;
    end
    // busy stays high for cycles 1..Nr, so the result appears on edge Nr+1
    expect_int("AES-128 cycles", n128 + 1, 11);
    expect_int("AES-192 cycles", n192 + 1, 13);
    expect_int("AES-256 cycles", n256 + 1, 15);
    expect128("AES-128 result", out128, encrypt(pt, k1, 128));
    expect128("AES-192 result", out192, encrypt(pt, k2, 192));
    expect128("AES-256 result", out256, encrypt(pt, k3, 256));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk = '0; key128 = '0; key192 = '0; key256 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // FIPS-197 Appendix C.1, C.2, C.3
    run(128'h00112233445566778899aabbccddeeff,
        256'h000102030405060708090a0b0c0d0e0f,
        256'h000102030405060708090a0b0c0d0e0f1011121314151617,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 1'b0);
    expect128("FIPS-197 C.1", out128, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    expect128("FIPS-197 C.2", out192, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    expect128("FIPS-197 C.3", out256, 128'h8ea2b7ca516745bfeafc49904b496089);
    // FIPS-197 Appendix B
    run(128'h3243f6a8885a308d313198a2e0370734, 256'h2b7e151628aed2a6abf7158809cf4f3c, '0, '0, 1'b1);
    expect128("FIPS-197 B", out128, 128'h3925841d02dc09fbdc118597196a0b32);
    repeat (3) @(posedge clk);
    #1 expect128("result held", out128, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 30; i++)
      run(rand128(), {rand128(), rand128()}, {rand128(), rand128()}, {rand128(), rand128()}, i[0]);  // unused high key bits random
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
