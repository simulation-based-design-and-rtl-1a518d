// tb_product_cipher: random data and keys against the reference (XOR key
// mixer, then bit reversal inside each 32-bit word), plus one-hot data with
// a zero key to trace each P-box wire.
module tb_product_cipher;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] d, k, q;

  product_cipher dut (.d_in(d), .key(k), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 328; i++) begin
      d = (i < 128) ? (128'd1 << i) : rand128();
      k = (i < 128) ? '0 : rand128();
      #1;
      checks++;
      if (q !== ref_pc(d, k)) begin failures++; $display("FAIL %h/%h: %h exp %h", d, k, q, ref_pc(d, k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
