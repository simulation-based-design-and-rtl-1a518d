// dgu_datapath: data path unit of the data generation unit.
//
// The ALU and the backup unit, as the source design composes them. The ALU
// result is available combinationally on alu_result (it feeds the memory
// unit) and, one clock later, on backup_result.
module dgu_datapath
  import sdl_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  dgu_ctl_t     ctl,
  output logic [W-1:0] alu_result,
  output logic [W-1:0] backup_result
);

  dgu_alu #(.W(W)) u_alu (.a(a), .b(b), .ctl(ctl), .y(alu_result));

  dgu_backup_unit #(.W(W)) u_backup (
    .clk(clk), .rst_n(rst_n), .d(alu_result), .q(backup_result)
  );

endmodule
