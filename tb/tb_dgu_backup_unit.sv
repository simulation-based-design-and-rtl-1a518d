// tb_dgu_backup_unit: checks that the backup register clears on reset and
// shows, after each rising clock edge, the value present before that edge.
module tb_dgu_backup_unit;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] d, q, prev;

  dgu_backup_unit dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = rand128();
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: %h", q); end
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      prev = rand128();
      d = prev;
      @(posedge clk); #1;
      d = rand128();
      checks++;
      if (q !== prev) begin failures++; $display("FAIL cycle %0d: %h exp %h", i, q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
