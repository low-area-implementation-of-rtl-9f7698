// tb_aes_ctr_keysizes: the AES-CTR core built for 192- and 256-bit keys.
// Runs the NIST SP 800-38A F.5.3 (CTR-AES192) and F.5.5 (CTR-AES256)
// examples and random operations against the reference model, and checks
// the longer latencies: 13 cycles for 192-bit and 15 for 256-bit keys.
module tb_aes_ctr_keysizes;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [255:0] key;
  logic [127:0] iv, iv_step;
  logic [511:0] pt, ct192, ct256;
  logic busy192, busy256, ovf192, ovf256;
  int checks = 0, failures = 0;

  aes_ctr #(.KEY_BITS(192)) dut192 (.clk, .rst, .start, .key, .iv, .iv_step, .plaintext(pt),
                                    .ciphertext(ct192), .busy(busy192), .iv_overflow(ovf192));
  aes_ctr #(.KEY_BITS(256)) dut256 (.clk, .rst, .start, .key, .iv, .iv_step, .plaintext(pt),
                                    .ciphertext(ct256), .busy(busy256), .iv_overflow(ovf256));

  always #5 clk = ~clk;

  function automatic logic [511:0] ref_ctr(logic [511:0] text, logic [255:0] k, int kb,
                                           logic [127:0] v, logic [127:0] s);
    logic [511:0] o;
    for (int b = 0; b < 4; b++)
      o[128*(4-b)-1 -: 128] = text[128*(4-b)-1 -: 128] ^ encrypt(v + s * 128'(b + 1), k, kb);
    return o;
  endfunction

  task automatic expect_bits(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s:\n  got %0h\n  exp %0h", what, got, exp);
    end
  endtask

  // Starts both cores on the same inputs and measures their latencies.
  task automatic op(logic [511:0] text, logic [255:0] k, logic [127:0] v, logic [127:0] s);
    int c192 = 0, c256 = 0;
    pt = text; key = k; iv = v; iv_step = s;
    start = 1'b1;
    for (int cyc = 1; cyc <= 16; cyc++) begin
      @(posedge clk); #1;
      start = 1'b0;
      if (busy192) c192 = cyc;
      if (busy256) c256 = cyc;
    end
    checks += 2;
    if (c192 + 1 != 13) begin failures++; $display("FAIL AES-192 latency %0d", c192 + 1); end
    if (c256 + 1 != 15) begin failures++; $display("FAIL AES-256 latency %0d", c256 + 1); end
    expect_bits("AES-192 CTR", ct192, ref_ctr(text, k, 192, v, s));
    expect_bits("AES-256 CTR", ct256, ref_ctr(text, k, 256, v, s));
  endtask

  localparam logic [511:0] PT = {128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                                 128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam logic [127:0] IV = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfefe;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt = '0; key = '0; iv = '0; iv_step = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // F.5.3: the 192-bit key sits in the low bits of the key port
    op(PT, 256'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, IV, 128'd1);
    expect_bits("SP800-38A F.5.3", ct192,
                {128'h1abc932417521ca24f2b0459fe7e6e0b, 128'h090339ec0aa6faefd5ccc2c6f4ce8e94,
                 128'h1e36b26bd1ebc670d1bd1d665620abf7, 128'h4f78a7f6d29809585a97daec58c6b050});
    op(PT, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, IV, 128'd1);
    expect_bits("SP800-38A F.5.5", ct256,
                {128'h601ec313775789a5b7a7f504bbf3d228, 128'hf443e3ca4d62b59aca84e990cacaf5c5,
                 128'h2b0930daa23de94ce87017ba2d84988d, 128'hdfc9c58db67aada613c2dd08457941a6});
    for (int i = 0; i < 10; i++)
      op({rand128(), rand128(), rand128(), rand128()}, {rand128(), rand128()}, rand128(), rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
