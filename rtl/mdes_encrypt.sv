// mdes_encrypt: modified DES encryption unit.
//
// Initial permutation, sixteen Feistel rounds (mdes_round) keyed K1..K16 by
// the round key generator from the 112-bit cipher key, then the final
// permutation; the result is the 128-bit "middle data". No swap is undone
// after round 16: the final permutation takes round 16's output directly, as
// in the source design. Fully unrolled and combinational (the source design
// reports it as a combinational path). ROUNDS can be lowered only for
// experiments; the round key generator always makes sixteen keys.
module mdes_encrypt
  import sdl_pkg::*;
#(
  parameter int unsigned NROUNDS = ROUNDS
) (
  input  logic [DATA_W-1:0]   plain_data,
  input  logic [DESKEY_W-1:0] cipher_key,
  output logic [DATA_W-1:0]   middle_data
);

  logic [ROUNDS-1:0][RKEY_W-1:0] round_keys;
  logic [DATA_W-1:0]             stage [0:NROUNDS];

  mdes_round_key_gen u_keys (.cipher_key(cipher_key), .round_keys(round_keys));

  mdes_initial_permutation u_ip (.d_in(plain_data), .d_out(stage[0]));

  for (genvar i = 0; i < NROUNDS; i++) begin : g_round
    mdes_round u_round (.d_in(stage[i]), .round_key(round_keys[i]), .d_out(stage[i+1]));
  end

  mdes_final_permutation u_fp (.d_in(stage[NROUNDS]), .d_out(middle_data));

endmodule
