// tb_rev_product_cipher: the reverse cipher must return the data that the
// reference forward cipher enciphered, for random data and keys.
module tb_rev_product_cipher;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] d, k, c, q;

  rev_product_cipher dut (.d_in(c), .key(k), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d = rand128(); k = rand128(); c = ref_pc(d, k);
      #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL %h/%h: %h", d, k, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
