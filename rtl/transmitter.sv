// transmitter: 128-bit data generation and 256-bit encryption chain.
//
// data_generation_unit -> mdes_encrypt (112-bit key) -> hamming_encoder_224
// -> conv_224_to_256 -> iterated_product_cipher (128-bit key), the order of
// the source design. The generated data comes from the memory unit, so it is
// zero while chip_enable is 0; everything after the data generation unit is
// combinational, so coded_data follows generated_data within the same cycle
// and lags the ALU inputs by one clock. All four product cipher keys K1..K4
// are driven from the single ipc_key (the source design simulates the cipher
// with one 128-bit key); every intermediate word is brought out for
// observation.
module transmitter
  import sdl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   first_input_data,
  input  logic [DATA_W-1:0]   second_input_data,
  input  logic [3:0]          control_signal,
  input  logic                chip_enable,
  input  logic [DESKEY_W-1:0] des_key,
  input  logic [IPCKEY_W-1:0] ipc_key,
  output logic [DATA_W-1:0]   backup_result,
  output logic [DATA_W-1:0]   generated_data,
  output logic [DATA_W-1:0]   middle_data,
  output logic [HAM_W-1:0]    hamming_data,
  output logic [CODE_W-1:0]   converted_data,
  output logic [CODE_W-1:0]   coded_data
);

  data_generation_unit #(.W(DATA_W)) u_dgu (
    .clk(clk), .rst_n(rst_n),
    .first_input_data(first_input_data), .second_input_data(second_input_data),
    .control_signal(control_signal), .chip_enable(chip_enable),
    .backup_result(backup_result), .data_out(generated_data)
  );

  mdes_encrypt u_des (
    .plain_data(generated_data), .cipher_key(des_key), .middle_data(middle_data)
  );

  hamming_encoder_224 u_ham (.m(middle_data), .e(hamming_data));

  conv_224_to_256 u_conv (.d_in(hamming_data), .d_out(converted_data));

  iterated_product_cipher u_ipc (
    .d_in(converted_data), .keys({4{ipc_key}}), .d_out(coded_data)
  );

endmodule
