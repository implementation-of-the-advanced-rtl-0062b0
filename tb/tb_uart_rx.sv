// tb_uart_rx: drives serial frames (8N1, LSB first) into the receiver at
// the tick rate it expects, with a small rate error, and checks every byte,
// that a frame with a low stop bit raises frame_err instead of valid, and
// that a short low glitch on the idle line is not taken as a start bit.
module tb_uart_rx;
  int checks = 0, failures = 0;
  localparam int DIV = 4;
  localparam int BIT = 16 * DIV;
  logic clk = 0, rst_n = 0, tick = 0, rxd = 1, valid, frame_err;
  logic [7:0] data;
  int tdiv = 0, n_valid = 0, n_err = 0;
  logic [7:0] got [$];

  uart_rx dut (.clk, .rst_n, .tick, .rxd, .valid, .data, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdiv <= (tdiv == DIV - 1) ? 0 : tdiv + 1;
    tick <= (tdiv == DIV - 1);
    if (rst_n && valid) begin n_valid++; got.push_back(data); end
    if (rst_n && frame_err) n_err++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input int bit_clocks, input logic stop);
    rxd = 0; repeat (bit_clocks) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (bit_clocks) @(negedge clk); end
    rxd = stop; repeat (bit_clocks) @(negedge clk);
    rxd = 1;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp_q [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      // bit time within +-3% of nominal
      send(b, BIT + int'($urandom_range(0, 4)) - 2, 1'b1);
      exp_q.push_back(b);
      repeat ($urandom_range(0, 2 * BIT)) @(negedge clk);
    end
    repeat (BIT) @(negedge clk);
    chk(n_valid == 40, $sformatf("%0d bytes received, expected 40", n_valid));
    foreach (exp_q[i]) chk(i < got.size() && got[i] == exp_q[i], $sformatf("byte %0d", i));
    // bad stop bit
    send(8'ha5, BIT, 1'b0);
    repeat (2 * BIT) @(negedge clk);
    chk(n_err == 1, "frame error flagged");
    chk(n_valid == 40, "bad frame dropped");
    // glitch shorter than half a bit
    rxd = 0; repeat (BIT / 4) @(negedge clk); rxd = 1;
    repeat (12 * BIT) @(negedge clk);
    chk(n_valid == 40 && n_err == 1, "glitch ignored");
    send(8'h3c, BIT, 1'b1);
    repeat (BIT) @(negedge clk);
    chk(n_valid == 41 && got[$] == 8'h3c, "receives after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
