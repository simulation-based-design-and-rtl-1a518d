// tb_iterated_product_cipher: random 256-bit data and four distinct random
// keys against the reference (upper half through ciphers 1 and 2, lower
// half through 3 and 4); distinct keys catch a swapped key or chain.
module tb_iterated_product_cipher;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [255:0] d, q;
  logic [3:0][127:0] k;

  iterated_product_cipher dut (.d_in(d), .keys(k), .d_out(q));

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
      #1;
      checks++;
      if (q !== ref_ipc(d, k)) begin failures++; $display("FAIL %h: %h exp %h", d, q, ref_ipc(d, k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
