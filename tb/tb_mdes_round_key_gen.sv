// tb_mdes_round_key_gen: compares all sixteen round keys with the reference
// equations for random keys and for single-bit keys (each bit 0..111 set in
// turn), which catches any misplaced bit selection.
module tb_mdes_round_key_gen;
  import sdl_pkg::*;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [111:0] key;
  logic [15:0][95:0] rk;

  mdes_round_key_gen dut (.cipher_key(key), .round_keys(rk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [111:0] k);
    key = k; #1;
    for (int n = 1; n <= 16; n++) begin
      checks++;
      if (rk[n-1] !== ref_round_key(k, n)) begin
        failures++;
        $display("FAIL key %h K%0d: %h exp %h", k, n, rk[n-1], ref_round_key(k, n));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 112; i++) try(112'd1 << i);
    for (int i = 0; i < 50; i++) try({$urandom(), $urandom(), $urandom(), 16'($urandom())});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
