// mdes_des_function: the round function F(R, K) of the modified DES.
//
// Four stages, all from the source design:
//   expansion P-box   e = {r[31:0], r[63:32], 32'b0}            (64 -> 96)
//   XOR unit          x = e ^ round_key                         (96)
//   straight P-box    s = {x[31:0], x[63:32], x[95:64]}         (96)
//   compression P-box f = {s[15:0], s[31:16], s[63:32]}         (96 -> 64)
// The compression keeps only s[63:0]. Combinational.
module mdes_des_function
  import sdl_pkg::*;
(
  input  logic [HALF_W-1:0] r,
  input  logic [RKEY_W-1:0] round_key,
  output logic [HALF_W-1:0] f
);

  logic [RKEY_W-1:0] expanded, mixed, straight;

  assign expanded = {r[31:0], r[63:32], 32'b0};
  assign mixed    = expanded ^ round_key;
  assign straight = {mixed[31:0], mixed[63:32], mixed[95:64]};
  assign f        = {straight[15:0], straight[31:16], straight[63:32]};

endmodule
