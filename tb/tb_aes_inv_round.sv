// tb_aes_inv_round: checks one decryption round against the FIPS-197
// example (last inverse round) and the reference model on random data.
module tb_aes_inv_round;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s_in, rk, s_out;
  logic fin;

  aes_inv_round dut (.state_in(s_in), .round_key(rk), .final_round(fin), .state_out(s_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // FIPS-197 appendix C.1 inverse cipher, last inverse round (key 0)
    s_in = 128'h6353e08c0960e104cd70b751bacad0e7; rk = 128'h000102030405060708090a0b0c0d0e0f; fin = 1; #1;
    chk(s_out == 128'h00112233445566778899aabbccddeeff, $sformatf("last inverse round %h", s_out));
    for (int i = 0; i < 200; i++) begin
      s_in = rand128(); rk = rand128(); fin = 1'(i % 2); #1;
      chk(s_out == dec_round(s_in, rk, fin), $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
