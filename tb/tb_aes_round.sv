// tb_aes_round: checks one encryption round against the FIPS-197 example
// (round 1 and the last round) and against the reference model on random
// states and keys, with and without MixColumns.
module tb_aes_round;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s_in, rk, s_out;
  logic fin;

  aes_round dut (.state_in(s_in), .round_key(rk), .final_round(fin), .state_out(s_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // FIPS-197 appendix B, round 1
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; rk = 128'ha0fafe1788542cb123a339392a6c7605; fin = 0; #1;
    chk(s_out == 128'ha49c7ff2689f352b6b5bea43026a5049, $sformatf("round 1 %h", s_out));
    // round 10
    s_in = 128'heb40f21e592e38848ba113e71bc342d2; rk = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6; fin = 1; #1;
    chk(s_out == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("round 10 %h", s_out));
    for (int i = 0; i < 200; i++) begin
      s_in = rand128(); rk = rand128(); fin = 1'(i % 2); #1;
      chk(s_out == enc_round(s_in, rk, fin), $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
