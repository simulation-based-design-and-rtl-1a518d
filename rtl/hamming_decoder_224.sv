// hamming_decoder_224: reverse Hamming (224,128) unit of the receiver.
//
// Cuts the 224-bit word into 32 seven-bit codes, code i = e[7i+6:7i], decodes
// each with single-error correction and joins the 4-bit results into
// m[4i+3:4i]. corrected[i] flags that word i had a bit corrected. The layout
// mirrors the transmitter's encoder; correction is this design's choice.
// Combinational.
module hamming_decoder_224
  import sdl_pkg::*;
(
  input  logic [HAM_W-1:0]  e,
  output logic [DATA_W-1:0] m,
  output logic [WORDS-1:0]  corrected
);

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    hamming74_decoder u_dec (.h(e[7*i +: 7]), .b(m[4*i +: 4]), .corrected(corrected[i]));
  end

endmodule
