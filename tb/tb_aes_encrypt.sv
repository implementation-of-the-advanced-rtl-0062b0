// tb_aes_encrypt: checks the cipher core on the FIPS-197 examples
// (appendix B, including the state after the initial AddRoundKey, and
// appendix C.1), on random blocks and keys against the reference model,
// the 11-cycle latency, back-to-back blocks, and that start is ignored
// while busy.
module tb_aes_encrypt;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  block_t din, dout;
  round_keys_t rks;

  aes_encrypt dut (.clk, .rst_n, .start, .block_in(din), .round_keys(rks), .busy, .done, .block_out(dout));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_key(input block_t k);
    for (int r = 0; r <= 10; r++) rks[r] = round_key(k, r);
  endtask

  task automatic run(input block_t pt, output block_t ct, output int cycles);
    @(negedge clk); din = pt; start = 1;
    @(negedge clk); start = 0; din = rand128();
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    ct = dout;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    block_t ct, k, pt;
    int cyc;
    din = '0; rks = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    @(negedge clk); din = 128'h3243f6a8885a308d313198a2e0370734; start = 1;
    @(negedge clk); start = 0;
    chk(dout == 128'h193de3bea0f4e22b9ac68d2ae9f84808, $sformatf("after initial AddRoundKey %h", dout));
    chk(busy, "busy");
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(cyc == 11, $sformatf("latency %0d, expected 11", cyc));
    chk(dout == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("appendix B ciphertext %h", dout));
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h00112233445566778899aabbccddeeff, ct, cyc);
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("appendix C.1 ciphertext %h", ct));
    for (int i = 0; i < 30; i++) begin
      k = rand128(); pt = rand128();
      set_key(k);
      run(pt, ct, cyc);
      chk(ct == encrypt(pt, k), $sformatf("random %0d", i));
      chk(cyc == 11, "latency");
    end
    // a start while busy must not disturb the block in flight
    k = rand128(); pt = rand128(); set_key(k);
    @(negedge clk); din = pt; start = 1;
    @(negedge clk); din = rand128(); repeat (3) @(negedge clk);
    start = 0;
    cyc = 4;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(dout == encrypt(pt, k), "start ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
