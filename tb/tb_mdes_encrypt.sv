// tb_mdes_encrypt: known-answer test (128'h3 under key 112'h12 gives
// 128'h00008000000080008000200000008003, the result the source design's
// simulation shows) and random data and keys against the reference model.
module tb_mdes_encrypt;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] p, c;
  logic [111:0] key;

  mdes_encrypt dut (.plain_data(p), .cipher_key(key), .middle_data(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = KAT_PLAIN; key = KAT_KEY; #1;
    checks++;
    if (c !== KAT_MIDDLE) begin failures++; $display("FAIL KAT: %h", c); end
    for (int i = 0; i < 200; i++) begin
      p = rand128(); key = {$urandom(), $urandom(), $urandom(), 16'($urandom())};
      #1;
      checks++;
      if (c !== ref_des_enc(p, key)) begin failures++; $display("FAIL %h/%h: %h exp %h", p, key, c, ref_des_enc(p, key)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
