// tb_mdes_decrypt: decrypts the known-answer ciphertext and reference
// ciphertexts of random data and keys, expecting the original plaintext.
module tb_mdes_decrypt;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] p, c, q;
  logic [111:0] key;

  mdes_decrypt dut (.middle_data(c), .cipher_key(key), .plain_data(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = KAT_MIDDLE; key = KAT_KEY; #1;
    checks++;
    if (q !== KAT_PLAIN) begin failures++; $display("FAIL KAT: %h", q); end
    for (int i = 0; i < 200; i++) begin
      p = rand128(); key = {$urandom(), $urandom(), $urandom(), 16'($urandom())};
      c = ref_des_enc(p, key);
      #1;
      checks++;
      if (q !== p) begin failures++; $display("FAIL %h/%h: %h", p, key, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
