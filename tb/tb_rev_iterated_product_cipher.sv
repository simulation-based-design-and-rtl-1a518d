// tb_rev_iterated_product_cipher: the reverse unit must return the data the
// reference forward unit enciphered, with four distinct random keys.
module tb_rev_iterated_product_cipher;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [255:0] d, c, q;
  logic [3:0][127:0] k;

  rev_iterated_product_cipher dut (.d_in(c), .keys(k), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = {rand128(), rand128()};
      for (int j = 0; j < 4; j++) k[j] = rand128();
      c = ref_ipc(d, k);
      #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL %h: %h", d, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
