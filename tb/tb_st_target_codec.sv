// tb_st_target_codec: checks target encryption and reconstruction.
// A target encrypted and decrypted with the same phi must come back whole
// when the upper 16 bits of the branch address match the target's; with a
// different phi the low 32 bits must differ by exactly the XOR of the two
// keys, so the planted target is not reproduced.
module tb_st_target_codec;
  logic [31:0] enc_phi, dec_phi, enc_out, dec_in;
  logic [47:0] enc_in, dec_ip, dec_out;
  int checks = 0, failures = 0;

  st_target_codec dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [47:0] tgt;
      tgt = {$urandom(), $urandom()};
      enc_phi = $urandom();
      dec_phi = (n % 2) ? enc_phi : $urandom();
      enc_in = tgt;
      #1;
      check(enc_out == (tgt[31:0] ^ enc_phi), "stored word");
      check(enc_out != tgt[31:0] || enc_phi == 0, "stored word equals plain target");
      dec_in = enc_out;
      dec_ip = {tgt[47:32], 32'($urandom())};
      #1;
      check(dec_out[47:32] == tgt[47:32], "upper bits must come from the branch address");
      if (dec_phi == enc_phi) check(dec_out == tgt, $sformatf("round trip %h -> %h", tgt, dec_out));
      else check(dec_out[31:0] == (tgt[31:0] ^ enc_phi ^ dec_phi) && dec_out != tgt, "foreign-key decode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
