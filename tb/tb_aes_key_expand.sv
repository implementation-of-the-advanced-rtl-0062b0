// tb_aes_key_expand: checks the key generator against the FIPS-197
// appendix A.1 schedule (round keys 1..10 of key 2b7e1516...), against the
// reference model for random keys, the ready latency of 10 cycles, and that
// a new start restarts the expansion.
module tb_aes_key_expand;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, ready;
  block_t key;
  round_keys_t rks;

  aes_key_expand dut (.clk, .rst_n, .start, .key, .ready, .round_keys(rks));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [127:0] KNOWN [11] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};

  task automatic expand_and_wait(input block_t k, output int cycles);
    @(negedge clk); key = k; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!ready && cycles < 100) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(!ready, "not ready after reset");
    expand_and_wait(KNOWN[0], cyc);
    chk(cyc == 11, $sformatf("ready after %0d cycles, expected 11", cyc));
    for (int r = 0; r <= 10; r++) chk(rks[r] == KNOWN[r], $sformatf("round key %0d = %h", r, rks[r]));
    // the intermediate words of the first step: RotWord(09cf4f3c) = cf4f3c09, SubWord = 8a84eb01
    chk({rks[0][23:0], rks[0][31:24]} == 32'hcf4f3c09, "RotWord of last column");
    for (int i = 0; i < 20; i++) begin
      automatic block_t k = rand128();
      expand_and_wait(k, cyc);
      chk(cyc == 11, "latency");
      for (int r = 0; r <= 10; r++) chk(rks[r] == round_key(k, r), $sformatf("random key %0d round %0d", i, r));
    end
    // restart in the middle of an expansion
    @(negedge clk); key = rand128(); start = 1;
    @(negedge clk); start = 0; repeat (4) @(negedge clk);
    expand_and_wait(KNOWN[0], cyc);
    chk(rks[10] == KNOWN[10], "restart mid-expansion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
