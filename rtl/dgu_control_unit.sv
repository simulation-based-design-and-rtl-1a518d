// dgu_control_unit: control unit of the data generation unit.
//
// Turns the 4-bit control signal into the ALU's control signals (a
// dgu_ctl_t): which unit drives the result, how the adder's B input is
// formed, which logic function is used and whether it is complemented, and
// the shift type. Purely combinational.
//
// The source design only says that the control unit generates the control
// signals and that the ALU's operation follows the control value. The
// operation set (see sdl_pkg::alu_op_e) and its decoding are this design's
// choice; code 1 is subtraction and code 8 is NOT A, the two results its
// simulation shows.
module dgu_control_unit
  import sdl_pkg::*;
(
  input  logic [3:0] control_signal,
  output dgu_ctl_t   ctl
);

  always_comb begin
    ctl            = '0;
    ctl.res_sel    = SEL_LOGIC;
    ctl.logic_fn   = LF_PASS;
    ctl.shift_fn   = SH_LEFT;
    unique case (alu_op_e'(control_signal))
      OP_ADD:  begin ctl.res_sel = SEL_ADDER; end
      OP_SUB:  begin ctl.res_sel = SEL_ADDER; ctl.invert_b = 1'b1; ctl.carry_in = 1'b1; end
      OP_INC:  begin ctl.res_sel = SEL_ADDER; ctl.b_zero = 1'b1; ctl.carry_in = 1'b1; end
      OP_DEC:  begin ctl.res_sel = SEL_ADDER; ctl.b_zero = 1'b1; ctl.invert_b = 1'b1; end
      OP_AND:  begin ctl.logic_fn = LF_AND; end
      OP_OR:   begin ctl.logic_fn = LF_OR; end
      OP_XOR:  begin ctl.logic_fn = LF_XOR; end
      OP_XNOR: begin ctl.logic_fn = LF_XOR; ctl.invert_out = 1'b1; end
      OP_NOTA: begin ctl.logic_fn = LF_PASS; ctl.invert_out = 1'b1; end
      OP_NOTB: begin ctl.logic_fn = LF_PASS; ctl.logic_on_b = 1'b1; ctl.invert_out = 1'b1; end
      OP_NAND: begin ctl.logic_fn = LF_AND; ctl.invert_out = 1'b1; end
      OP_NOR:  begin ctl.logic_fn = LF_OR; ctl.invert_out = 1'b1; end
      OP_SHL:  begin ctl.res_sel = SEL_SHIFT; ctl.shift_fn = SH_LEFT; end
      OP_SHR:  begin ctl.res_sel = SEL_SHIFT; ctl.shift_fn = SH_RIGHT; end
      OP_ROL:  begin ctl.res_sel = SEL_SHIFT; ctl.shift_fn = SH_ROTL; end
      OP_PASB: begin ctl.logic_fn = LF_PASS; ctl.logic_on_b = 1'b1; end
      default: ;
    endcase
  end

endmodule
