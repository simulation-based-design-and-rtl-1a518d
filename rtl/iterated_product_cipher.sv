// iterated_product_cipher: 256-bit modified iterated product cipher.
//
// The bit separator unit splits the 256-bit input into two 128-bit halves.
// The upper half d_in[255:128] passes product cipher 1 (key K1) and then
// product cipher 2 (K2); the lower half passes product cipher 3 (K3) and
// then 4 (K4). The bit append unit joins the outputs of ciphers 2 and 4:
//   d_out = {PC2(PC1(upper)), PC4(PC3(lower))}.
// The four ciphers, their keys and the separator/append units are the source
// design's; its figure places ciphers 1 and 3 after the separator and 2 and 4
// before the append unit, read here as two chains of two. Which half goes to
// which chain is this design's choice. keys[i] is K(i+1). Combinational.
module iterated_product_cipher
  import sdl_pkg::*;
(
  input  logic [CODE_W-1:0]            d_in,
  input  logic [3:0][IPCKEY_W-1:0]     keys,
  output logic [CODE_W-1:0]            d_out
);

  logic [DATA_W-1:0] upper, lower, upper_mid, lower_mid;

  // Bit separator unit.
  assign upper = d_in[CODE_W-1:DATA_W];
  assign lower = d_in[DATA_W-1:0];

  product_cipher u_pc1 (.d_in(upper),     .key(keys[0]), .d_out(upper_mid));
  product_cipher u_pc2 (.d_in(upper_mid), .key(keys[1]), .d_out(d_out[CODE_W-1:DATA_W]));
  product_cipher u_pc3 (.d_in(lower),     .key(keys[2]), .d_out(lower_mid));
  product_cipher u_pc4 (.d_in(lower_mid), .key(keys[3]), .d_out(d_out[DATA_W-1:0]));

endmodule
