// mdes_decrypt: reverse modified DES unit of the receiver.
//
// Inverts mdes_encrypt. The final permutation is undone by the initial
// permutation (both are the same involution); each round is undone by the
// forward round applied to the swapped halves, with the result swapped back:
// if {L', R'} = {R, L ^ F(R,K)}, then round({R', L'}) = {L', L} and swapping
// gives {L, R}. Keys are used in reverse order K16..K1, and the last step is
// the final permutation, which undoes the initial one. Combinational.
// The source design only names this unit; this construction is the exact
// inverse of the encryption it describes.
module mdes_decrypt
  import sdl_pkg::*;
#(
  parameter int unsigned NROUNDS = ROUNDS
) (
  input  logic [DATA_W-1:0]   middle_data,
  input  logic [DESKEY_W-1:0] cipher_key,
  output logic [DATA_W-1:0]   plain_data
);

  logic [ROUNDS-1:0][RKEY_W-1:0] round_keys;
  logic [DATA_W-1:0]             stage [0:NROUNDS];

  mdes_round_key_gen u_keys (.cipher_key(cipher_key), .round_keys(round_keys));

  mdes_initial_permutation u_ip (.d_in(middle_data), .d_out(stage[0]));

  for (genvar i = 0; i < NROUNDS; i++) begin : g_round
    logic [DATA_W-1:0] swapped_in, swapped_out;
    assign swapped_in = {stage[i][HALF_W-1:0], stage[i][DATA_W-1:HALF_W]};
    mdes_round u_round (
      .d_in(swapped_in), .round_key(round_keys[NROUNDS-1-i]), .d_out(swapped_out)
    );
    assign stage[i+1] = {swapped_out[HALF_W-1:0], swapped_out[DATA_W-1:HALF_W]};
  end

  mdes_final_permutation u_fp (.d_in(stage[NROUNDS]), .d_out(plain_data));

endmodule
