// tb_secure_data_link: end-to-end test of the whole link at its default
// sizes. The testbench plays the channel: it feeds tx_coded_data back into
// rx_coded_data, sometimes with one bit flipped. Each clock it applies new
// ALU inputs, chip enable and keys, and one clock later checks the
// transmitter's stages against the reference chain and that the receiver
// returns the generated data. It counts how often each mechanism of the
// design happened: each of the sixteen ALU operations, chip enable low
// (generated data forced to zero) and high, a channel error corrected by the
// Hamming decoder, a flip in the padding bits, a key change, and the
// known-answer vector 0A - 07 = 03 under DES key 12h. A mechanism that never
// happened counts as a failure.
module tb_secure_data_link;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce;
  logic [127:0] a, b, ipc_key, backup_result, gen, middle, rx_data, exp_gen;
  logic [3:0]   code;
  logic [111:0] des_key;
  logic [223:0] ham;
  logic [255:0] conv, tx_coded, rx_coded;
  logic [31:0]  rx_corr;
  int op_seen [16];
  int n_ce_low = 0, n_ce_high = 0, n_corrected = 0, n_pad_flip = 0, n_key_change = 0, n_kat = 0;

  secure_data_link dut (
    .clk(clk), .rst_n(rst_n), .first_input_data(a), .second_input_data(b),
    .control_signal(code), .chip_enable(ce), .des_key(des_key), .ipc_key(ipc_key),
    .backup_result(backup_result), .generated_data(gen), .middle_data(middle),
    .hamming_data(ham), .converted_data(conv), .tx_coded_data(tx_coded),
    .rx_coded_data(rx_coded), .rx_data(rx_data), .rx_corrected(rx_corr)
  );

  always #5 clk = ~clk;

  task automatic chk(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // One transfer: inputs before the edge, checks after it.
  task automatic transfer(logic [127:0] va, logic [127:0] vb, logic [3:0] op, logic vce,
                          logic [111:0] dk, logic [127:0] ik, int flip);
    logic [127:0] m;
    @(negedge clk);
    if (dk != des_key || ik != ipc_key) n_key_change++;
    a = va; b = vb; code = op; ce = vce; des_key = dk; ipc_key = ik;
    @(posedge clk); #1;
    exp_gen = vce ? ref_alu(va, vb, op) : 128'h0;
    m = ref_des_enc(exp_gen, dk);
    chk(256'(backup_result), 256'(ref_alu(va, vb, op)), "backup");
    chk(256'(gen), 256'(exp_gen), "generated");
    chk(256'(middle), 256'(m), "middle");
    chk(256'(ham), 256'(ref_ham224(m)), "hamming");
    chk(conv, {32'h0, ref_ham224(m)}, "converted");
    chk(tx_coded, ref_ipc({32'h0, ref_ham224(m)}, {4{ik}}), "coded");
    // Channel.
    rx_coded = tx_coded;
    if (flip >= 0) rx_coded[flip] ^= 1'b1;
    #1;
    chk(256'(rx_data), 256'(exp_gen), "received");
    if (flip >= 0) begin
      checks++;
      if ($countones(rx_corr) > 1) begin failures++; $display("FAIL more than one word corrected"); end
      if (rx_corr != 0) n_corrected++;
      else n_pad_flip++;
    end else begin
      chk(256'(rx_corr), 256'(0), "no correction without error");
    end
    op_seen[op]++;
    if (vce) n_ce_high++; else n_ce_low++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; code = '0; ce = 0; des_key = '0; ipc_key = '0; rx_coded = '0;
    foreach (op_seen[i]) op_seen[i] = 0;
    #12 rst_n = 1;
    // Source design's stimulus: 0A and 07, chip enable low then high.
    transfer(128'h0A, 128'h07, 4'h1, 1'b0, KAT_KEY, 128'h2134134134, -1);
    chk(256'(backup_result), 256'(128'h03), "backup 0A-07 with C=0");
    transfer(128'h0A, 128'h07, 4'h1, 1'b1, KAT_KEY, 128'h2134134134, 5);
    chk(256'(middle), 256'(KAT_MIDDLE), "KAT middle");
    chk(256'(ham), 256'(KAT_HAMMING), "KAT hamming");
    chk(conv, KAT_CONVERTED, "KAT converted");
    if (middle == KAT_MIDDLE && ham == KAT_HAMMING && rx_data == KAT_PLAIN) n_kat++;
    // Random traffic: about two transfers in three carry one flipped channel
    // bit; one flip in eight lands on a padding bit, which the receiver drops.
    for (int i = 0; i < 400; i++) begin
      int flip;
      flip = ($urandom_range(2) == 0) ? -1 : int'($urandom_range(255));
      transfer(rand128(), rand128(), 4'(i), 1'($urandom_range(3) != 0),
               (i % 50 == 0) ? {$urandom(), $urandom(), $urandom(), 16'($urandom())} : des_key,
               (i % 70 == 0) ? rand128() : ipc_key, flip);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL ALU op %0h never ran", i); end
    end
    checks += 6;
    if (n_ce_low == 0)     begin failures++; $display("FAIL chip enable low never happened"); end
    if (n_ce_high == 0)    begin failures++; $display("FAIL chip enable high never happened"); end
    if (n_corrected == 0)  begin failures++; $display("FAIL no channel error corrected"); end
    if (n_pad_flip == 0)   begin failures++; $display("FAIL no padding flip"); end
    if (n_key_change == 0) begin failures++; $display("FAIL keys never changed"); end
    if (n_kat == 0)        begin failures++; $display("FAIL known-answer vector not seen"); end
    $display("mechanisms: ce_low=%0d ce_high=%0d corrected=%0d padding_flips=%0d key_changes=%0d kat=%0d",
             n_ce_low, n_ce_high, n_corrected, n_pad_flip, n_key_change, n_kat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
