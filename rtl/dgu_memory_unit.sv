// dgu_memory_unit: 128-bit memory of the data generation unit.
//
// Stores one word, written with d on every rising clock edge (cleared by the
// active-low asynchronous reset). The chip enable gates the read side: with
// chip_enable = 1 the stored word appears on q, with chip_enable = 0 q is all
// zeros. The gating follows the source design ("gives no output when C is
// '0'", and its simulation shows zeros); one word written every clock is this
// design's choice.
module dgu_memory_unit #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         chip_enable,
  output logic [W-1:0] q
);

  logic [W-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_q <= '0;
    else        mem_q <= d;
  end

  assign q = chip_enable ? mem_q : '0;

endmodule
