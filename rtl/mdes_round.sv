// mdes_round: one Feistel round (the Fiestal cipher unit) of the modified DES.
//
// The bit separator splits d_in into the left half L = d_in[127:64] and the
// right half R = d_in[63:0]. The XOR unit forms L ^ F(R, K) with the DES
// function; the swap unit makes R the new left half and the XOR result the
// new right half; the bit append unit joins them:
//   d_out = {R, L ^ F(R, K)}.
// Structure and data paths follow the source design. Combinational.
module mdes_round
  import sdl_pkg::*;
(
  input  logic [DATA_W-1:0] d_in,
  input  logic [RKEY_W-1:0] round_key,
  output logic [DATA_W-1:0] d_out
);

  logic [HALF_W-1:0] left, right, f, xored;

  // Bit separator unit.
  assign left  = d_in[DATA_W-1:HALF_W];
  assign right = d_in[HALF_W-1:0];

  mdes_des_function u_f (.r(right), .round_key(round_key), .f(f));

  // XOR unit.
  assign xored = left ^ f;

  // Swap unit and bit append unit.
  assign d_out = {right, xored};

endmodule
