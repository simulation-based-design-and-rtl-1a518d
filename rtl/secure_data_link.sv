// secure_data_link: transmitter and receiver of the 128-bit secure data link.
//
// The transmitter generates 128-bit data with an ALU-based data generation
// unit and protects it in four steps: modified DES (112-bit key), Hamming
// (224,128) code, padding to 256 bits and a modified iterated product cipher
// (128-bit key). The receiver undoes the steps in reverse order, correcting a
// single bit error per 7-bit Hamming word. The radio channel between them
// (antennas and satellite) is not logic: tx_coded_data leaves the top and
// rx_coded_data enters it, so a testbench or a real link closes the loop.
//
// Timing: the data generation unit registers the ALU result (one clock);
// the rest of both chains is combinational, so tx_coded_data is valid one
// clock after the ALU inputs and rx_data follows rx_coded_data combinationally.
module secure_data_link
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
  output logic [CODE_W-1:0]   tx_coded_data,
  input  logic [CODE_W-1:0]   rx_coded_data,
  output logic [DATA_W-1:0]   rx_data,
  output logic [WORDS-1:0]    rx_corrected
);

  transmitter u_tx (
    .clk(clk), .rst_n(rst_n),
    .first_input_data(first_input_data), .second_input_data(second_input_data),
    .control_signal(control_signal), .chip_enable(chip_enable),
    .des_key(des_key), .ipc_key(ipc_key),
    .backup_result(backup_result), .generated_data(generated_data),
    .middle_data(middle_data), .hamming_data(hamming_data),
    .converted_data(converted_data), .coded_data(tx_coded_data)
  );

  receiver u_rx (
    .coded_data(rx_coded_data), .des_key(des_key), .ipc_key(ipc_key),
    .data_out(rx_data), .corrected(rx_corrected)
  );

endmodule
