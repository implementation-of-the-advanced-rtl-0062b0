// tb_frame_buffer: random writes and reads on both ports of the image
// memory, compared with a model array; checks the one-cycle read latency
// and read-before-write on port B.
module tb_frame_buffer;
  int checks = 0, failures = 0;
  localparam int DEPTH = 1000, AW = 10;
  logic clk = 0, a_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata, b_rdata;
  logic [7:0] model [DEPTH];

  frame_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  always #5 clk = ~clk;

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
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = AW'(i); a_wdata = 8'($urandom); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [AW-1:0] ra = AW'($urandom_range(0, DEPTH - 1));
      automatic logic [AW-1:0] rb = AW'($urandom_range(0, DEPTH - 1));
      automatic logic [7:0] eb;
      @(negedge clk);
      a_addr = ra; b_addr = (i % 10 == 0) ? ra : rb;
      a_we = ($urandom_range(0, 3) == 0); a_wdata = 8'($urandom);
      eb = model[b_addr];
      @(posedge clk);
      #1;
      chk(b_rdata == eb, $sformatf("port B read %0d", b_addr));
      chk(a_rdata == model[ra], $sformatf("port A read %0d", ra));
      if (a_we) model[ra] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
