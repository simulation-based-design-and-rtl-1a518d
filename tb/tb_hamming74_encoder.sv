// tb_hamming74_encoder: all sixteen data words against the reference code,
// and a check that every pair of code words differs in at least three bits.
module tb_hamming74_encoder;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] b;
  logic [6:0] h;
  logic [6:0] codes [16];

  hamming74_encoder dut (.b(b), .h(h));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b = 4'(i); #1;
      codes[i] = h;
      checks++;
      if (h !== ref_ham7(b)) begin failures++; $display("FAIL %h: %b exp %b", b, h, ref_ham7(b)); end
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if ($countones(codes[i] ^ codes[j]) < 3) begin failures++; $display("FAIL distance %0d %0d", i, j); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
