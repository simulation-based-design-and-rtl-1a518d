// tb_receiver: builds coded data with the reference transmitter chain for
// random data and keys, optionally flips one bit of the 256-bit channel word,
// and expects the original data back; corrected must flag exactly the word
// that held the flipped bit (no flag for a flip in the padding).
module tb_receiver;
  import sdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] d, ipc_key, q;
  logic [111:0] des_key;
  logic [255:0] coded;
  logic [31:0]  corr;
  int           flipped;

  receiver dut (.coded_data(coded), .des_key(des_key), .ipc_key(ipc_key),
                .data_out(q), .corrected(corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [255:0] clean, bad, plain_ipc;
      d = rand128();
      des_key = {$urandom(), $urandom(), $urandom(), 16'($urandom())};
      ipc_key = rand128();
      plain_ipc = {32'h0, ref_ham224(ref_des_enc(d, des_key))};
      clean = ref_ipc(plain_ipc, {4{ipc_key}});
      coded = clean;
      flipped = -1;
      if (i % 3 != 0) begin
        // Flip bit t before the cipher; XORs and bit permutations map it to
        // exactly one flipped bit of the transmitted word.
        flipped = $urandom_range(255);
        bad = plain_ipc;
        bad[flipped] ^= 1'b1;
        coded = ref_ipc(bad, {4{ipc_key}});
        checks++;
        if ($countones(coded ^ clean) != 1) begin failures++; $display("FAIL not a single-bit channel error"); end
      end
      #1;
      checks += 2;
      if (q !== d) begin failures++; $display("FAIL data %h: %h (flip %0d)", d, q, flipped); end
      if (corr !== ((flipped >= 0 && flipped < 224) ? (32'd1 << (flipped / 7)) : 32'd0)) begin
        failures++; $display("FAIL corrected %h (flip %0d)", corr, flipped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
