// tb_hamming74_decoder: every data word, with no error and with each of the
// seven single-bit errors, must decode to the original data; corrected must
// be 0 without error and 1 with one.
module tb_hamming74_decoder;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [6:0] h;
  logic [3:0] b;
  logic       corr;

  hamming74_decoder dut (.h(h), .b(b), .corrected(corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int e = -1; e < 7; e++) begin
        h = ref_ham7(4'(i));
        if (e >= 0) h[e] = ~h[e];
        #1;
        checks += 2;
        if (b !== 4'(i)) begin failures++; $display("FAIL data %h err %0d: %h", i, e, b); end
        if (corr !== (e >= 0)) begin failures++; $display("FAIL flag data %h err %0d", i, e); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
