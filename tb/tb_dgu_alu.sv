// tb_dgu_alu: drives the ALU with hand-built control words for each of the
// sixteen operations and compares with the reference ALU, on random operands
// and on edge values (carry and borrow across all 128 bits, top-bit shifts).
module tb_dgu_alu;
  import sdl_pkg::*;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] a, b, y;
  dgu_ctl_t     ctl;

  dgu_alu dut (.a(a), .b(b), .ctl(ctl), .y(y));

  // Control words written out here independently of the control unit.
  function automatic dgu_ctl_t ctl_of(int op);
    dgu_ctl_t c = '0;
    c.res_sel = SEL_LOGIC; c.logic_fn = LF_PASS; c.shift_fn = SH_LEFT;
    case (op)
      0:  c.res_sel = SEL_ADDER;
      1:  begin c.res_sel = SEL_ADDER; c.invert_b = 1; c.carry_in = 1; end
      2:  begin c.res_sel = SEL_ADDER; c.b_zero = 1; c.carry_in = 1; end
      3:  begin c.res_sel = SEL_ADDER; c.b_zero = 1; c.invert_b = 1; end
      4:  c.logic_fn = LF_AND;
      5:  c.logic_fn = LF_OR;
      6:  c.logic_fn = LF_XOR;
      7:  begin c.logic_fn = LF_XOR; c.invert_out = 1; end
      8:  c.invert_out = 1;
      9:  begin c.logic_on_b = 1; c.invert_out = 1; end
      10: begin c.logic_fn = LF_AND; c.invert_out = 1; end
      11: begin c.logic_fn = LF_OR; c.invert_out = 1; end
      12: begin c.res_sel = SEL_SHIFT; c.shift_fn = SH_LEFT; end
      13: begin c.res_sel = SEL_SHIFT; c.shift_fn = SH_RIGHT; end
      14: begin c.res_sel = SEL_SHIFT; c.shift_fn = SH_ROTL; end
      default: c.logic_on_b = 1;
    endcase
    return c;
  endfunction

  task automatic run(logic [127:0] va, logic [127:0] vb, int op);
    a = va; b = vb; ctl = ctl_of(op);
    #1;
    checks++;
    if (y !== ref_alu(va, vb, 4'(op))) begin
      failures++;
      $display("FAIL op %0d a=%h b=%h got %h exp %h", op, va, vb, y, ref_alu(va, vb, 4'(op)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      run('1, 128'd1, op);
      run('0, 128'd1, op);
      run({1'b1, 127'd0}, '1, op);
      for (int rep = 0; rep < 40; rep++) run(rand128(), rand128(), op);
    end
    // Value shown by the source design's simulation: 0A - 07 = 03.
    run(128'h0A, 128'h07, 1);
    checks++;
    if (y !== 128'h03) begin failures++; $display("FAIL 0A-07 = %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
