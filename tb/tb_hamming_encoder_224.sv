// tb_hamming_encoder_224: known-answer test (the modified DES result of the
// reference vector encodes to the 224-bit word the source design's
// simulation shows) and random words against the reference.
module tb_hamming_encoder_224;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] m;
  logic [223:0] e;

  hamming_encoder_224 dut (.m(m), .e(e));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = KAT_MIDDLE; #1;
    checks++;
    if (e !== KAT_HAMMING) begin failures++; $display("FAIL KAT: %h", e); end
    for (int i = 0; i < 200; i++) begin
      m = rand128(); #1;
      checks++;
      if (e !== ref_ham224(m)) begin failures++; $display("FAIL %h: %h", m, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
