// tb_dgu_memory_unit: checks that the memory stores the word present at each
// rising clock edge, shows it only while chip_enable is 1, shows zeros while
// it is 0, and keeps the stored word across toggles of chip_enable.
module tb_dgu_memory_unit;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce;
  logic [127:0] d, q, stored;

  dgu_memory_unit dut (.clk(clk), .rst_n(rst_n), .d(d), .chip_enable(ce), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = rand128(); ce = 1;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: %h", q); end
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      stored = rand128(); d = stored; ce = 1'($urandom);
      @(posedge clk); #1;
      d = rand128();
      checks++;
      if (q !== (ce ? stored : 128'h0)) begin failures++; $display("FAIL %0d ce=%b q=%h", i, ce, q); end
      ce = ~ce; #1;
      checks++;
      if (q !== (ce ? stored : 128'h0)) begin failures++; $display("FAIL %0d toggled ce=%b q=%h", i, ce, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
