// tb_aes_sbox: checks the forward and inverse S-box over all 256 inputs
// against the reference model and a few published values.
module tb_aes_sbox;
  import tb_aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, yf, yi;

  aes_sbox #(.INVERSE(1'b0)) dut_f (.in_byte(x), .out_byte(yf));
  aes_sbox #(.INVERSE(1'b1)) dut_i (.in_byte(x), .out_byte(yi));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      chk(yf == sbox_of(x, 0), $sformatf("S(%02h)=%02h", x, yf));
      chk(yi == sbox_of(x, 1), $sformatf("Sinv(%02h)=%02h", x, yi));
    end
    x = 8'h00; #1; chk(yf == 8'h63, "S(00)");
    x = 8'h53; #1; chk(yf == 8'hed, "S(53)");
    x = 8'h09; #1; chk(yf == 8'h01, "S(09)");   // 09cf4f3c -> 8a84eb01 in the key schedule
    x = 8'hcf; #1; chk(yf == 8'h8a, "S(cf)");
    x = 8'h63; #1; chk(yi == 8'h00, "Sinv(63)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
