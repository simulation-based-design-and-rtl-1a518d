// tb_mdes_initial_permutation: checks the initial permutation bit by bit (one-hot
// inputs at every position), on random words, and that applying it twice
// gives back the input.
module tb_mdes_initial_permutation;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] d, q;

  mdes_initial_permutation dut (.d_in(d), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 228; i++) begin
      d = (i < 128) ? (128'd1 << i) : rand128();
      #1;
      checks++;
      if (q !== ref_perm(d)) begin failures++; $display("FAIL in %h: %h exp %h", d, q, ref_perm(d)); end
      checks++;
      if (ref_perm(q) !== d) begin failures++; $display("FAIL not an involution for %h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
