// data_generation_unit: 128-bit data generation unit.
//
// Control unit, data path unit (ALU and backup unit) and memory unit. On each
// rising clock edge the ALU result of (first_input_data, second_input_data)
// under control_signal is loaded into both the backup unit and the memory
// unit. backup_result always shows it; data_out shows it only while
// chip_enable (the memory's chip enable C) is 1 and is zero otherwise. Both
// outputs therefore lag the inputs by one clock.
//
// The three components and the chip-enable behaviour follow the source
// design; the clocking, the reset and the ALU's operation set are this
// design's choice.
module data_generation_unit
  import sdl_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] first_input_data,
  input  logic [W-1:0] second_input_data,
  input  logic [3:0]   control_signal,
  input  logic         chip_enable,
  output logic [W-1:0] backup_result,
  output logic [W-1:0] data_out
);

  dgu_ctl_t     ctl;
  logic [W-1:0] alu_result;

  dgu_control_unit u_ctrl (.control_signal(control_signal), .ctl(ctl));

  dgu_datapath #(.W(W)) u_dp (
    .clk(clk), .rst_n(rst_n), .a(first_input_data), .b(second_input_data),
    .ctl(ctl), .alu_result(alu_result), .backup_result(backup_result)
  );

  dgu_memory_unit #(.W(W)) u_mem (
    .clk(clk), .rst_n(rst_n), .d(alu_result), .chip_enable(chip_enable),
    .q(data_out)
  );

endmodule
