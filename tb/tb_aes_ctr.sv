// tb_aes_ctr: end-to-end test of the AES-CTR core at its default size
// (128-bit key, four 128-bit blocks = 512-bit text).
//
// Runs the NIST SP 800-38A F.5.1 CTR-AES128 example (IV f0f1..fcfdfefe with
// step 1, so the first counter block is f0f1..fcfdfeff), its decryption, and
// random operations compared with the reference model. Checks the 11-cycle
// latency of every operation and makes each mechanism of the core happen:
// counter overflow, a step other than one, start while busy (ignored), reset
// in the middle of an operation, and back-to-back operations. Each is counted
// and must occur at least once.
module tb_aes_ctr;
  import aes_ref_pkg::*;

  localparam int BLOCKS = 4;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [255:0] key;
  logic [127:0] iv, iv_step;
  logic [128*BLOCKS-1:0] pt, ct;
  logic busy, iv_overflow;
  int checks = 0, failures = 0;
  int n_ops = 0, n_overflow = 0, n_step = 0, n_ignored = 0, n_reset = 0, n_b2b = 0, n_decrypt = 0;

  aes_ctr dut (.clk, .rst, .start, .key, .iv, .iv_step, .plaintext(pt), .ciphertext(ct), .busy, .iv_overflow);

  always #5 clk = ~clk;

  task automatic expect_bits(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s:\n  got %0h\n  exp %0h", what, got, exp);
    end
  endtask

  function automatic logic [128*BLOCKS-1:0] ref_ctr(logic [128*BLOCKS-1:0] text, logic [255:0] k,
                                                    logic [127:0] v, logic [127:0] s, output logic ovf);
    logic [128*BLOCKS-1:0] o;
    logic [129:0] c;
    ovf = 1'b0;
    for (int b = 0; b < BLOCKS; b++) begin
      c = 130'(v) + 130'(s) * 130'(b + 1);
      ovf |= |c[129:128];
      o[128*(BLOCKS-b)-1 -: 128] = text[128*(BLOCKS-b)-1 -: 128] ^ encrypt(c[127:0], k, 128);
    end
    return o;
  endfunction

  // One operation, with start raised right away; returns just after the
  // edge on which busy falls, so a following call starts on the first idle
  // cycle. poke: raise start again in the middle of the run.
  task automatic op(logic [511:0] text, logic [255:0] k, logic [127:0] v, logic [127:0] s, bit poke);
    int cycles = 0;
    logic [511:0] exp;
    logic eovf;
    pt = text; key = k; iv = v; iv_step = s;
    exp = ref_ctr(text, k, v, s, eovf);
    start = 1'b1;
    @(posedge clk); #1;
    cycles = 1;
    start = 1'b0;
    key = {rand128(), rand128()}; iv = rand128(); iv_step = rand128();  // only sampled at start
    while (busy && cycles < 40) begin
      if (poke && cycles == 5) begin
        start = 1'b1;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk); #1;
      cycles++;
    end
    start = 1'b0;
    checks++;
    if (cycles != 11) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 11", cycles);
    end
    expect_bits("ciphertext", ct, exp);
    checks++;
    if (iv_overflow !== eovf) begin
      failures++;
      $display("FAIL iv_overflow %0b expected %0b", iv_overflow, eovf);
    end
    n_ops++;
    n_overflow += eovf;
    n_step += (s != 128'd1);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [511:0] F51_PT = {128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                                     128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam logic [511:0] F51_CT = {128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
                                     128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
  localparam logic [255:0] F51_KEY = 256'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] F51_IV  = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfefe;

  initial begin
    pt = '0; key = '0; iv = '0; iv_step = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end

    // SP 800-38A F.5.1 encrypt and decrypt
    op(F51_PT, F51_KEY, F51_IV, 128'd1, 1'b0);
    expect_bits("SP800-38A F.5.1 encrypt", ct, F51_CT);
    op(F51_CT, F51_KEY, F51_IV, 128'd1, 1'b1);
    expect_bits("SP800-38A F.5.1 decrypt", ct, F51_PT);
    n_decrypt++;

    // counter wraps past 2^128 in block 2
    op({4{rand128()}}, {rand128(), rand128()}, '1 - 128'd2, 128'd1, 1'b0);
    // large step that overflows, then a clean op clears the flag
    op({4{rand128()}}, {rand128(), rand128()}, 128'h8000_0000_0000_0000_0000_0000_0000_0000, 128'h4000_0000_0000_0000_0000_0000_0000_0000, 1'b0);
    op(F51_PT, F51_KEY, F51_IV, 128'd1, 1'b0);

    // reset in the middle of an operation, then a normal one
    start = 1'b1; key = F51_KEY; iv = '1; iv_step = 128'd5;
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks += 2;
    if (busy)        begin failures++; $display("FAIL busy after mid-run reset"); end
    if (iv_overflow) begin failures++; $display("FAIL iv_overflow after reset"); end
    n_reset++;
    op(F51_PT, F51_KEY, F51_IV, 128'd1, 1'b0);
    expect_bits("after reset", ct, F51_CT);

    // back to back: the next start comes on the first idle cycle
    for (int i = 0; i < 20; i++) begin
      op({rand128(), rand128(), rand128(), rand128()}, {rand128(), rand128()}, rand128(),
         (i % 2) ? rand128() : 128'($urandom_range(1, 9)), i % 3 == 0);
      n_b2b++;
    end

    $display("mechanisms: ops=%0d overflow=%0d step!=1=%0d start-ignored=%0d reset=%0d back-to-back=%0d decrypt=%0d",
             n_ops, n_overflow, n_step, n_ignored, n_reset, n_b2b, n_decrypt);
    checks += 6;
    if (n_overflow == 0) begin failures++; $display("FAIL overflow never happened"); end
    if (n_step == 0)     begin failures++; $display("FAIL step other than one never used"); end
    if (n_ignored == 0)  begin failures++; $display("FAIL start while busy never happened"); end
    if (n_reset == 0)    begin failures++; $display("FAIL mid-run reset never happened"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL back-to-back never happened"); end
    if (n_decrypt == 0)  begin failures++; $display("FAIL decryption never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
