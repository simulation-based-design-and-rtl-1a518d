// tb_dgu_datapath: checks the combinational ALU result and the backup result
// one clock later, on random operands and operations.
module tb_dgu_datapath;
  import sdl_pkg::*;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] a, b, alu_result, backup_result, expect_q;
  logic [3:0]   code;
  dgu_ctl_t     ctl;

  dgu_control_unit u_ctrl (.control_signal(code), .ctl(ctl));
  dgu_datapath dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .ctl(ctl),
    .alu_result(alu_result), .backup_result(backup_result)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; code = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = rand128(); b = rand128(); code = 4'(i);
      #1;
      expect_q = ref_alu(a, b, code);
      checks++;
      if (alu_result !== expect_q) begin failures++; $display("FAIL alu op %0h", code); end
      @(posedge clk); #1;
      a = rand128();
      checks++;
      if (backup_result !== expect_q) begin failures++; $display("FAIL backup op %0h", code); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
