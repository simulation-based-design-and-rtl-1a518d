// conv_256_to_224: 256-to-224 bit converter of the receiver.
//
// Removes the 32 padding bits the transmitter's converter added at the top:
// d_out = d_in[223:0]. The padding bits are ignored, not checked. The source
// design only names this unit; dropping the padding is the inverse of its
// forward converter. Combinational.
module conv_256_to_224
  import sdl_pkg::*;
(
  input  logic [CODE_W-1:0] d_in,
  output logic [HAM_W-1:0]  d_out
);

  assign d_out = d_in[HAM_W-1:0];

endmodule
