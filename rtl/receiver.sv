// receiver: recovers the 128-bit data from the 256-bit coded data.
//
// rev_iterated_product_cipher -> conv_256_to_224 -> hamming_decoder_224 ->
// mdes_decrypt, the reverse of the transmitter chain, with the same two keys.
// A single flipped bit in the 256-bit coded data lands, after the reverse
// product cipher (XORs and bit permutations only), on a single bit of the
// 224-bit code and is corrected by the Hamming decoder; corrected[i] reports
// which 7-bit word was repaired (a flip in the 32 padding bits is simply
// dropped). The source design names these four units only; each is built as
// the inverse of its transmitter counterpart. Combinational.
module receiver
  import sdl_pkg::*;
(
  input  logic [CODE_W-1:0]   coded_data,
  input  logic [DESKEY_W-1:0] des_key,
  input  logic [IPCKEY_W-1:0] ipc_key,
  output logic [DATA_W-1:0]   data_out,
  output logic [WORDS-1:0]    corrected
);

  logic [CODE_W-1:0] deciphered;
  logic [HAM_W-1:0]  hamming_data;
  logic [DATA_W-1:0] middle_data;

  rev_iterated_product_cipher u_ripc (
    .d_in(coded_data), .keys({4{ipc_key}}), .d_out(deciphered)
  );

  conv_256_to_224 u_conv (.d_in(deciphered), .d_out(hamming_data));

  hamming_decoder_224 u_ham (.e(hamming_data), .m(middle_data), .corrected(corrected));

  mdes_decrypt u_des (.middle_data(middle_data), .cipher_key(des_key), .plain_data(data_out));

endmodule
