// product_cipher: one product cipher of the modified iterated product cipher.
//
// Key mixer, P box and bit append unit, as in the source design:
//   key mixer  x = d_in ^ key                         (128 bits)
//   P box      four 32-bit permutations P1..P4, P1 on x[127:96], P2 on
//              x[95:64], P3 on x[63:32], P4 on x[31:0]
//   bit append d_out = {P1, P2, P3, P4}
// The source design names the key mixer and the four 32-bit P boxes but does
// not give their contents: the XOR mixer and the permutations (each reverses
// the bit order of its 32-bit word) are this design's choice. Combinational.
module product_cipher
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0]   d_in,
  input  logic [IPCKEY_W-1:0] key,
  output logic [DATA_W-1:0]   d_out
);

  logic [DATA_W-1:0] mixed;

  // Key mixer.
  assign mixed = d_in ^ key;

  // P box: P1..P4, then the bit append unit joins the four words in order.
  always_comb begin
    for (int unsigned w = 0; w < 4; w++) begin
      for (int unsigned j = 0; j < 32; j++) begin
        d_out[32*w + j] = mixed[32*w + 31 - j];
      end
    end
  end

endmodule
