// tb_conv_256_to_224: random 256-bit words (padding included) must come out
// as their low 224 bits.
module tb_conv_256_to_224;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [255:0] d;
  logic [223:0] q;

  conv_256_to_224 dut (.d_in(d), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = KAT_CONVERTED; #1;
    checks++;
    if (q !== KAT_HAMMING) begin failures++; $display("FAIL KAT: %h", q); end
    for (int i = 0; i < 100; i++) begin
      d = {rand128(), rand128()}; #1;
      checks++;
      if (q !== d[223:0]) begin failures++; $display("FAIL %h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
