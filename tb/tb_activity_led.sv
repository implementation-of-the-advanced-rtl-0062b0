// tb_activity_led: the LED stays dark without activity, lights at once on
// the first byte, toggles every BLINK_HALF_CYCLES while bytes keep coming,
// and goes dark two half-periods after the last one.
module tb_activity_led;
  int checks = 0, failures = 0;
  localparam int HALF = 20;
  logic clk = 0, rst_n = 0, activity = 0, led;
  int toggles = 0;
  logic led_q = 0;

  activity_led #(.BLINK_HALF_CYCLES(HALF)) dut (.clk, .rst_n, .activity, .led);

  always #5 clk = ~clk;
  always @(posedge clk) begin led_q <= led; if (rst_n && led != led_q) toggles++; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    chk(!led && toggles == 0, "dark while idle");
    activity = 1; @(negedge clk); activity = 0;
    @(negedge clk);
    chk(led, "lit on first activity");
    toggles = 0;
    // a byte every 15 clocks for 400 clocks
    for (int i = 0; i < 400; i++) begin
      activity = (i % 15 == 0);
      @(negedge clk);
    end
    activity = 0;
    chk(toggles >= 400 / HALF - 2 && toggles <= 400 / HALF + 2, $sformatf("%0d toggles while active", toggles));
    repeat (2 * HALF + 5) @(negedge clk);
    chk(!led, "dark after hold time");
    toggles = 0;
    repeat (200) @(negedge clk);
    chk(!led && toggles == 0, "stays dark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
