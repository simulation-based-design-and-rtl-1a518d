// tb_mdes_round: checks one Feistel round against the reference: the new
// left half is the old right half and the new right half is L ^ F(R,K).
module tb_mdes_round;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] d, q;
  logic [95:0]  k;

  mdes_round dut (.d_in(d), .round_key(k), .d_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d = rand128(); k = {$urandom(), $urandom(), $urandom()};
      #1;
      checks++;
      if (q !== ref_round(d, k)) begin failures++; $display("FAIL %h: %h exp %h", d, q, ref_round(d, k)); end
      checks++;
      if (q[127:64] !== d[63:0]) begin failures++; $display("FAIL swap"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
