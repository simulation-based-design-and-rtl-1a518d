// tb_data_generation_unit: replays the source design's data generation
// stimulus (first input 0A, second input 07, control stepping 0..8, chip
// enable 0 and then 1) and adds random operands over all sixteen codes.
// Checks: backup_result equals the ALU result one clock later whatever the
// chip enable; data_out equals it when chip_enable = 1 and is zero when 0;
// control 1 with 0A and 07 gives 03 and control 8 gives a word starting with
// FFFFFFFF, as that simulation shows.
module tb_data_generation_unit;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce;
  logic [127:0] a, b, backup_result, data_out, expect_q;
  logic [3:0]   code;

  data_generation_unit dut (
    .clk(clk), .rst_n(rst_n), .first_input_data(a), .second_input_data(b),
    .control_signal(code), .chip_enable(ce), .backup_result(backup_result), .data_out(data_out)
  );

  always #5 clk = ~clk;

  task automatic step(logic [127:0] va, logic [127:0] vb, logic [3:0] op, logic vce);
    @(negedge clk);
    a = va; b = vb; code = op; ce = vce;
    expect_q = ref_alu(va, vb, op);
    @(posedge clk); #1;
    checks += 2;
    if (backup_result !== expect_q) begin failures++; $display("FAIL backup op %0h: %h exp %h", op, backup_result, expect_q); end
    if (data_out !== (vce ? expect_q : 128'h0)) begin failures++; $display("FAIL data_out op %0h ce %b: %h", op, vce, data_out); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; code = '0; ce = 0;
    #12 rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      for (int op = 0; op <= 8; op++) begin
        step(128'h0A, 128'h07, 4'(op), 1'(c));
        if (op == 1) begin
          checks++;
          if (backup_result !== 128'h03) begin failures++; $display("FAIL 0A-07 backup %h", backup_result); end
        end
        if (op == 8) begin
          checks++;
          if (backup_result[127:96] !== 32'hFFFFFFFF) begin failures++; $display("FAIL op 8 top word %h", backup_result[127:96]); end
        end
      end
    end
    for (int i = 0; i < 200; i++) step(rand128(), rand128(), 4'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
