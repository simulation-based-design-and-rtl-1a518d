// mdes_round_key_gen: round key generator of the modified DES.
//
// Derives sixteen 96-bit round keys from the 112-bit cipher key, using the
// fixed bit selections of the source design, all on the key's low 96 bits
// k = cipher_key[95:0] (bits 111..96 feed no round key):
//   K1..K4   k rotated right by 1..4 bit positions
//   K5..K7   ~k
//   K8..K10  {k[45], k[95:1]}, {k[48], k[95:1]}, {k[41], k[95:1]}
//   K11      {k[45], k[94:1], k[90]}
//   K12..K16 {k[j], k[95:1]} with j = 91, 45, 46, 40, 1
// round_keys[i] is key K(i+1). Pure wiring and inverters, combinational.
module mdes_round_key_gen
  import sdl_pkg::*;
(
  input  logic [DESKEY_W-1:0]          cipher_key,
  output logic [ROUNDS-1:0][RKEY_W-1:0] round_keys
);

  logic [RKEY_W-1:0] k;
  assign k = cipher_key[RKEY_W-1:0];

  // Index of the bit placed on top of k[95:1] in keys K8..K16 (K11 differs).
  localparam int unsigned TopBit [8:15] = '{45, 48, 41, 45, 91, 45, 46, 40};

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) begin
      round_keys[i] = (k >> (i + 1)) | (k << (RKEY_W - i - 1));
    end
    for (int unsigned i = 4; i < 7; i++) begin
      round_keys[i] = ~k;
    end
    for (int unsigned i = 7; i < 15; i++) begin
      round_keys[i] = {k[TopBit[i + 1]], k[RKEY_W-1:1]};
    end
    round_keys[10] = {k[45], k[94:1], k[90]};
    round_keys[15] = {k[1], k[RKEY_W-1:1]};
  end

endmodule
