// tb_hamming_decoder_224: encodes random words with the reference, flips up
// to one bit in each of several 7-bit words and expects the original data
// back with exactly those words flagged as corrected.
module tb_hamming_decoder_224;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] m, q;
  logic [223:0] e;
  logic [31:0]  corr, expect_corr;

  hamming_decoder_224 dut (.e(e), .m(q), .corrected(corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      m = rand128();
      e = ref_ham224(m);
      expect_corr = '0;
      for (int w = 0; w < 32; w++)
        if ($urandom_range(3) == 0) begin
          e[7*w + $urandom_range(6)] ^= 1'b1;
          expect_corr[w] = 1'b1;
        end
      #1;
      checks += 2;
      if (q !== m) begin failures++; $display("FAIL data %h: %h", m, q); end
      if (corr !== expect_corr) begin failures++; $display("FAIL flags %h exp %h", corr, expect_corr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
