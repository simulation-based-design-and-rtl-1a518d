// rev_iterated_product_cipher: reverse modified iterated product cipher.
//
// Inverse of iterated_product_cipher for the receiver: the upper half passes
// the reverse of cipher 2 (K2) and then of cipher 1 (K1); the lower half the
// reverse of cipher 4 (K4) and then of cipher 3 (K3):
//   d_out = {RPC1(RPC2(upper)), RPC3(RPC4(lower))}.
// The source design names this unit only; this is the exact inverse of this
// design's forward unit. keys[i] is K(i+1). Combinational.
module rev_iterated_product_cipher
  import sdl_pkg::*;
(
  input  logic [CODE_W-1:0]            d_in,
  input  logic [3:0][IPCKEY_W-1:0]     keys,
  output logic [CODE_W-1:0]            d_out
);

  logic [DATA_W-1:0] upper_mid, lower_mid;

  rev_product_cipher u_rpc2 (.d_in(d_in[CODE_W-1:DATA_W]), .key(keys[1]), .d_out(upper_mid));
  rev_product_cipher u_rpc1 (.d_in(upper_mid), .key(keys[0]), .d_out(d_out[CODE_W-1:DATA_W]));
  rev_product_cipher u_rpc4 (.d_in(d_in[DATA_W-1:0]), .key(keys[3]), .d_out(lower_mid));
  rev_product_cipher u_rpc3 (.d_in(lower_mid), .key(keys[2]), .d_out(d_out[DATA_W-1:0]));

endmodule
