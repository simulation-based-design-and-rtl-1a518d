// tb_mdes_des_function: compares F(R,K) with the reference on one-hot and
// random inputs; one-hot R and K bits trace every wire of the P-boxes.
module tb_mdes_des_function;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0] r, f;
  logic [95:0] k;

  mdes_des_function dut (.r(r), .round_key(k), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [63:0] vr, logic [95:0] vk);
    r = vr; k = vk; #1;
    checks++;
    if (f !== ref_f(vr, vk)) begin failures++; $display("FAIL r=%h k=%h: %h exp %h", vr, vk, f, ref_f(vr, vk)); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) try(64'd1 << i, '0);
    for (int i = 0; i < 96; i++) try('0, 96'd1 << i);
    for (int i = 0; i < 200; i++) try({$urandom(), $urandom()}, {$urandom(), $urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
