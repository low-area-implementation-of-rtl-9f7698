// tb_aes_sub_key: the key-expansion step for all three key sizes. For
// FIPS-197 keys and random keys, every window position of a full schedule is
// fed to the block and the next window compared with the reference
// KeyExpansion; the AES-128 round-1 key of FIPS-197 Appendix A.1 is also
// checked literally.
module tb_aes_sub_key;
  import aes_ref_pkg::*;

  logic [127:0] win128, out128;
  logic [191:0] win192, out192;
  logic [255:0] win256, out256;
  logic [6:0]   widx;
  int checks = 0, failures = 0;

  aes_sub_key                  dut128 (.win_i(win128), .widx_i(widx), .win_o(out128));
  aes_sub_key #(.KEY_BITS(192)) dut192 (.win_i(win192), .widx_i(widx), .win_o(out192));
  aes_sub_key #(.KEY_BITS(256)) dut256 (.win_i(win256), .widx_i(widx), .win_o(out256));

  function automatic logic [255:0] window(ref logic [31:0] w[60], input int first, input int nk);
    logic [255:0] v = '0;
    for (int i = 0; i < nk; i++) v = (v << 32) | 256'(w[first+i]);
    return v;
  endfunction

  task automatic run_key(logic [255:0] key, int key_bits);
    logic [31:0] w[60];
    int nk = key_bits / 32;
    int nr = nk + 6;
    logic [255:0] exp, got;
    key_expand(key, key_bits, w);
    for (int r = 0; 4*r + nk + 3 < 4*(nr+1); r++) begin
      widx = 7'(4*r + nk);
      win128 = window(w, 4*r, 4)[127:0];
      win192 = window(w, 4*r, 6)[191:0];
      win256 = window(w, 4*r, 8);
      #1;
      exp = window(w, 4*r + 4, nk);
      got = (nk == 4) ? 256'(out128) : (nk == 6) ? 256'(out192) : out256;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL Nk=%0d window at w[%0d]: got %064h expected %064h", nk, 4*r, got, exp);
      end
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
    win128 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    win192 = '0; win256 = '0; widx = 7'd4; #1;
    checks++;
    if (out128 !== 128'ha0fafe1788542cb123a339392a6c7605) begin
      failures++;
      $display("FAIL AES-128 round-1 key %032h", out128);
    end
    run_key(256'h2b7e151628aed2a6abf7158809cf4f3c, 128);
    run_key(256'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 192);
    run_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, 256);
    for (int i = 0; i < 20; i++) begin
      run_key({rand128(), rand128()} >> 128, 128);
      run_key({rand128(), rand128()} >> 64, 192);
      run_key({rand128(), rand128()}, 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
