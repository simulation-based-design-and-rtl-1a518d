// hamming_encoder_224: Hamming (224,128) code encryption unit.
//
// Bit separator units cut the 128-bit middle data into 32 four-bit words,
// word i = m[4i+3:4i]; a Hamming (7,4) code unit encodes each; the bit append
// unit places code i at e[7i+6:7i], giving 224 bits. Layout and structure
// follow the source design. Combinational.
module hamming_encoder_224
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0] m,
  output logic [HAM_W-1:0]  e
);

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    hamming74_encoder u_enc (.b(m[4*i +: 4]), .h(e[7*i +: 7]));
  end

endmodule
