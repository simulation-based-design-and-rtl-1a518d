// conv_224_to_256: 224-to-256 bit converter.
//
// Widens the Hamming code word to the 256 bits the iterated product cipher
// takes by placing 32 zero bits above it: d_out = {32'b0, d_in}. The zero
// padding at the top is what the source design's simulation shows.
// Combinational.
module conv_224_to_256
  import sdl_pkg::*;
(
  input  logic [HAM_W-1:0]  d_in,
  output logic [CODE_W-1:0] d_out
);

  assign d_out = {{(CODE_W-HAM_W){1'b0}}, d_in};

endmodule
