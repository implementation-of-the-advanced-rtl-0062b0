// tb_aes_decrypt: checks the inverse cipher core on the FIPS-197 examples
// (appendices B and C.1), on random ciphertexts against the reference model
// and as the inverse of the reference cipher, the 11-cycle latency and that
// start is ignored while busy.
module tb_aes_decrypt;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  block_t din, dout;
  round_keys_t rks;

  aes_decrypt dut (.clk, .rst_n, .start, .block_in(din), .round_keys(rks), .busy, .done, .block_out(dout));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_key(input block_t k);
    for (int r = 0; r <= 10; r++) rks[r] = round_key(k, r);
  endtask

  task automatic run(input block_t ct, output block_t pt, output int cycles);
    @(negedge clk); din = ct; start = 1;
    @(negedge clk); start = 0; din = rand128();
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    pt = dout;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    block_t pt, k, ct;
    int cyc;
    din = '0; rks = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(128'h3925841d02dc09fbdc118597196a0b32, pt, cyc);
    chk(pt == 128'h3243f6a8885a308d313198a2e0370734, $sformatf("appendix B plaintext %h", pt));
    chk(cyc == 11, $sformatf("latency %0d, expected 11", cyc));
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, pt, cyc);
    chk(pt == 128'h00112233445566778899aabbccddeeff, $sformatf("appendix C.1 plaintext %h", pt));
    for (int i = 0; i < 30; i++) begin
      k = rand128(); ct = rand128();
      set_key(k);
      run(ct, pt, cyc);
      chk(pt == decrypt(ct, k), $sformatf("random %0d", i));
      chk(encrypt(pt, k) == ct, $sformatf("round trip %0d", i));
      chk(cyc == 11, "latency");
    end
    k = rand128(); ct = rand128(); set_key(k);
    @(negedge clk); din = ct; start = 1;
    @(negedge clk); din = rand128(); repeat (3) @(negedge clk);
    start = 0;
    cyc = 4;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(dout == decrypt(ct, k), "start ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
