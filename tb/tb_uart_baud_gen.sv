// tb_uart_baud_gen: measures the tick period at both baud selections
// (651 and 54 clocks for 9600 and 115200 baud x16 at 100 MHz) and checks
// that switching baud_sel at run time takes effect within one period.
module tb_uart_baud_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, baud_sel = 0, tick;
  longint cyc = 0, last = -1;
  int periods [$];

  uart_baud_gen dut (.clk, .rst_n, .baud_sel, .tick);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tick) begin
      if (last >= 0) periods.push_back(int'(cyc - last));
      last = cyc;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int n, input int expect_p);
    periods.delete(); last = -1;
    wait (periods.size() >= n);
    foreach (periods[i]) if (i < n) chk(periods[i] == expect_p, $sformatf("period %0d, expected %0d", periods[i], expect_p));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(10, 651);
    @(negedge clk); baud_sel = 1; t0 = cyc;
    @(posedge clk iff tick);
    chk(cyc - t0 <= 56, $sformatf("first tick after switch in %0d clocks", cyc - t0));
    measure(20, 54);
    @(negedge clk); baud_sel = 0;
    measure(5, 651);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
