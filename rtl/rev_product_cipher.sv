// rev_product_cipher: inverse of one product cipher (receiver side).
//
// Undoes product_cipher: the P box is inverted first (each 32-bit word has
// its bit order reversed again, which restores it), then the key is removed
// with the same XOR the key mixer applied:
//   d_out = unpermute(d_in) ^ key.
// The source design only names the receiver's reverse unit; this is the exact
// inverse of this design's forward cipher. Combinational.
module rev_product_cipher
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0]   d_in,
  input  logic [IPCKEY_W-1:0] key,
  output logic [DATA_W-1:0]   d_out
);

  logic [DATA_W-1:0] unpermuted;

  always_comb begin
    for (int unsigned w = 0; w < 4; w++) begin
      for (int unsigned j = 0; j < 32; j++) begin
        unpermuted[32*w + 31 - j] = d_in[32*w + j];
      end
    end
  end

  assign d_out = unpermuted ^ key;

endmodule
