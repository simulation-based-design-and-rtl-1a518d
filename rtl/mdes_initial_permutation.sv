// mdes_initial_permutation: initial permutation of the modified DES.
//
// Exchanges the four lowest and the four highest bits in mirror order
// (bit j <-> bit 127-j for j = 0..3); bits 123..4 keep their place. This is
// the source design's permutation. Combinational wiring.
module mdes_initial_permutation
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0] d_in,
  output logic [DATA_W-1:0] d_out
);

  always_comb begin
    d_out = d_in;
    for (int unsigned j = 0; j < 4; j++) begin
      d_out[j]            = d_in[DATA_W-1-j];
      d_out[DATA_W-1-j]   = d_in[j];
    end
  end

endmodule
