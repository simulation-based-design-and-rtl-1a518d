// dgu_alu: arithmetic and logic unit of the data generation unit.
//
// Three units work in parallel on operands a and b and a multiplexer picks
// one, as the control signals (dgu_ctl_t from dgu_control_unit) say:
//   adder   a + (b or 0, optionally complemented) + carry_in: add, subtract,
//           increment, decrement; the carry out is discarded;
//   logic   and / or / xor / pass of a or b, optionally complemented;
//   shifter shift a left or right by one (zero fill) or rotate it left by one.
// Purely combinational. The source design gives the ALU's width (128 bits)
// but not its operation set, which is this design's choice.
module dgu_alu
  import sdl_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  dgu_ctl_t     ctl,
  output logic [W-1:0] y
);

  logic [W-1:0] add_b, add_y, log_y, sh_y;

  always_comb begin
    add_b = ctl.b_zero ? '0 : b;
    if (ctl.invert_b) add_b = ~add_b;
    add_y = a + add_b + W'(ctl.carry_in);
  end

  always_comb begin
    unique case (ctl.logic_fn)
      LF_AND:  log_y = a & b;
      LF_OR:   log_y = a | b;
      LF_XOR:  log_y = a ^ b;
      default: log_y = ctl.logic_on_b ? b : a;
    endcase
    if (ctl.invert_out) log_y = ~log_y;
  end

  always_comb begin
    unique case (ctl.shift_fn)
      SH_LEFT:  sh_y = {a[W-2:0], 1'b0};
      SH_RIGHT: sh_y = {1'b0, a[W-1:1]};
      default:  sh_y = {a[W-2:0], a[W-1]};
    endcase
  end

  always_comb begin
    unique case (ctl.res_sel)
      SEL_ADDER: y = add_y;
      SEL_SHIFT: y = sh_y;
      default:   y = log_y;
    endcase
  end

endmodule
