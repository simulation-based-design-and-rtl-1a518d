// tb_conv_224_to_256: known-answer test from the source design's simulation
// (zero padding at the top) and random words.
module tb_conv_224_to_256;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [223:0] d;
  logic [255:0] q;

  conv_224_to_256 dut (.d_in(d), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = KAT_HAMMING; #1;
    checks++;
    if (q !== KAT_CONVERTED) begin failures++; $display("FAIL KAT: %h", q); end
    for (int i = 0; i < 100; i++) begin
      d = {rand128(), rand128()}; #1;
      checks += 2;
      if (q[223:0] !== d) begin failures++; $display("FAIL data"); end
      if (q[255:224] !== 32'h0) begin failures++; $display("FAIL padding %h", q[255:224]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
