// tb_uart_tx: sends random bytes through the transmitter and decodes the
// line independently: each frame must be a start bit, eight data bits LSB
// first and a stop bit, each 16 ticks long (the start bit may lose part of
// the first tick), with the line high between frames and ready low while a
// frame is on the line.
module tb_uart_tx;
  int checks = 0, failures = 0;
  localparam int DIV = 4;     // clocks per tick
  localparam int BIT = 16 * DIV;
  logic clk = 0, rst_n = 0, tick = 0, valid = 0, ready, txd;
  logic [7:0] data;
  int tdiv = 0;

  uart_tx dut (.clk, .rst_n, .tick, .valid, .data, .ready, .txd);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdiv <= (tdiv == DIV - 1) ? 0 : tdiv + 1;
    tick <= (tdiv == DIV - 1);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] sent [$];

  // independent line decoder
  initial begin
    logic [7:0] b;
    int low_len;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      chk(txd == 1'b0, "start bit low at its centre");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = txd;
      end
      repeat (BIT) @(posedge clk);
      chk(txd == 1'b1, "stop bit high");
      if (sent.size() > 0) begin
        automatic logic [7:0] e = sent.pop_front();
        chk(b == e, $sformatf("byte %02h, expected %02h", b, e));
      end else chk(0, "unexpected frame");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, frame_clocks;
    data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(txd == 1'b1 && ready, "idle line high, ready");
    for (int i = 0; i < 40; i++) begin
      automatic logic [7:0] d = (i == 0) ? 8'h00 : (i == 1) ? 8'hff : (i == 2) ? 8'h55 : 8'($urandom);
      @(negedge clk);
      while (!ready) @(negedge clk);
      data = d; valid = 1; sent.push_back(d);
      @(negedge clk); valid = 0; data = 8'($urandom);
      t0 = 0;
      while (!ready) begin @(negedge clk); t0++; end
      frame_clocks = t0 + 1;
      chk(frame_clocks > 10 * BIT - DIV && frame_clocks <= 10 * BIT + 1,
          $sformatf("frame took %0d clocks", frame_clocks));
      if ((i % 7) == 0) repeat ($urandom_range(0, 100)) @(negedge clk);
    end
    repeat (BIT * 2) @(negedge clk);
    chk(sent.size() == 0, "all frames decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
