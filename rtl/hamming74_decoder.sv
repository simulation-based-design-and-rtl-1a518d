// hamming74_decoder: Hamming (7,4) decoder with single-error correction.
//
// Reads the code in hamming74_encoder's order, h[6:0] = p1 p2 B3 p3 B2 B1 B0,
// i.e. Hamming positions 1..7 = h[6] .. h[0]. The syndrome
//   s1 = h6^h4^h2^h0, s2 = h5^h4^h1^h0, s3 = h3^h2^h1^h0
// is the position (s3 s2 s1) of a single flipped bit, which is inverted
// before B3..B0 are taken out; corrected = 1 when that happened. Two flipped
// bits are miscorrected, as with any (7,4) code. The source design only names
// the receiver's reverse Hamming unit; correction is this design's reading of
// it. Combinational.
module hamming74_decoder (
  input  logic [6:0] h,
  output logic [3:0] b,
  output logic       corrected
);

  logic [2:0] syndrome;
  logic [6:0] fixed;

  always_comb begin
    syndrome[0] = h[6] ^ h[4] ^ h[2] ^ h[0];
    syndrome[1] = h[5] ^ h[4] ^ h[1] ^ h[0];
    syndrome[2] = h[3] ^ h[2] ^ h[1] ^ h[0];
    fixed = h;
    // Position p (1..7) is bit 7-p of h.
    if (syndrome != 3'd0) fixed[3'd7 - syndrome] = ~h[3'd7 - syndrome];
    corrected = (syndrome != 3'd0);
    b = {fixed[4], fixed[2], fixed[1], fixed[0]};
  end

endmodule
