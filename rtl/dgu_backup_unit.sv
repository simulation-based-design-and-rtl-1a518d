// dgu_backup_unit: backup register of the data generation unit's datapath.
//
// Keeps a copy of the ALU result, loaded on every rising clock edge and
// cleared by the active-low asynchronous reset. Its output is always
// visible, so the generated result can be read even while the memory unit's
// chip enable is low. The source design names the backup unit and says the
// result is obtained from it when the chip enable is low; the register, the
// clocking and the reset are this design's choice.
module dgu_backup_unit #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
