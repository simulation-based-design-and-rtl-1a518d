// tb_transmitter: clocks the transmitter with random operands, codes, chip
// enables and keys and checks every stage one clock after the inputs against
// the reference chain; also replays the known-answer vector (0A - 07 = 03,
// DES key 12h) through generation, modified DES, Hamming and padding.
module tb_transmitter;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce;
  logic [127:0] a, b, ipc_key, backup_result, gen, middle, exp_gen;
  logic [3:0]   code;
  logic [111:0] des_key;
  logic [223:0] ham;
  logic [255:0] conv, coded;

  transmitter dut (
    .clk(clk), .rst_n(rst_n), .first_input_data(a), .second_input_data(b),
    .control_signal(code), .chip_enable(ce), .des_key(des_key), .ipc_key(ipc_key),
    .backup_result(backup_result), .generated_data(gen), .middle_data(middle),
    .hamming_data(ham), .converted_data(conv), .coded_data(coded)
  );

  always #5 clk = ~clk;

  task automatic chk(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic step(logic [127:0] va, logic [127:0] vb, logic [3:0] op, logic vce,
                      logic [111:0] dk, logic [127:0] ik);
    logic [127:0] m;
    @(negedge clk);
    a = va; b = vb; code = op; ce = vce; des_key = dk; ipc_key = ik;
    @(posedge clk); #1;
    exp_gen = vce ? ref_alu(va, vb, op) : 128'h0;
    m = ref_des_enc(exp_gen, dk);
    chk(256'(backup_result), 256'(ref_alu(va, vb, op)), "backup");
    chk(256'(gen), 256'(exp_gen), "generated");
    chk(256'(middle), 256'(m), "middle");
    chk(256'(ham), 256'(ref_ham224(m)), "hamming");
    chk(conv, {32'h0, ref_ham224(m)}, "converted");
    chk(coded, ref_ipc({32'h0, ref_ham224(m)}, {4{ik}}), "coded");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; code = '0; ce = 0; des_key = '0; ipc_key = '0;
    #12 rst_n = 1;
    step(128'h0A, 128'h07, 4'h1, 1'b1, KAT_KEY, 128'h2134134134);
    chk(256'(gen), 256'(KAT_PLAIN), "KAT generated");
    chk(256'(middle), 256'(KAT_MIDDLE), "KAT middle");
    chk(256'(ham), 256'(KAT_HAMMING), "KAT hamming");
    chk(conv, KAT_CONVERTED, "KAT converted");
    for (int i = 0; i < 100; i++)
      step(rand128(), rand128(), 4'($urandom), 1'($urandom),
           {$urandom(), $urandom(), $urandom(), 16'($urandom())}, rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
