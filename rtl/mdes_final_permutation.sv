// mdes_final_permutation: final permutation of the modified DES.
//
// The source design uses the same exchange as the initial permutation: bit j
// and bit 127-j trade places for j = 0..3, bits 123..4 stay. The permutation
// is its own inverse. Combinational wiring.
module mdes_final_permutation
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0] d_in,
  output logic [DATA_W-1:0] d_out
);

  always_comb begin
    d_out = d_in;
    for (int unsigned j = 0; j < 4; j++) begin
      d_out[DATA_W-1-j] = d_in[j];
      d_out[j]          = d_in[DATA_W-1-j];
    end
  end

endmodule
