// tb_dgu_control_unit: checks the control unit's decoding by driving an ALU
// with its output and comparing every operation code, on random operands,
// with the reference ALU. Also checks the result-unit selection per code.
module tb_dgu_control_unit;
  import sdl_pkg::*;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0]   code;
  dgu_ctl_t     ctl;
  logic [127:0] a, b, y;

  dgu_control_unit dut (.control_signal(code), .ctl(ctl));
  // The reference ALU below is behavioural; this ALU turns control signals
  // into a value so that every field of ctl matters.
  dgu_alu u_alu (.a(a), .b(b), .ctl(ctl), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int op = 0; op < 16; op++) begin
        code = 4'(op); a = rand128(); b = rand128();
        #1;
        checks++;
        if (y !== ref_alu(a, b, code)) begin
          failures++;
          $display("FAIL op %0h: got %h exp %h", op, y, ref_alu(a, b, code));
        end
        checks++;
        if ((op < 4) != (ctl.res_sel == SEL_ADDER) || (op >= 12 && op != 15) != (ctl.res_sel == SEL_SHIFT)) begin
          failures++;
          $display("FAIL op %0h: unit select %0d", op, ctl.res_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
