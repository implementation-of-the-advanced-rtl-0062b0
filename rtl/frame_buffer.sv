// frame_buffer: image memory, a simple two-port block RAM of bytes.
//
// Each byte holds two 4-bit pixels (even pixel in the low nibble). Port A
// reads or writes for the datapath (image load, transmit read-out or
// received-image write), port B only reads, for the VGA scan-out. Both reads
// are synchronous: data appears the cycle after the address. A write and a
// port-B read of the same address in one cycle return the old byte on
// port B. The default depth holds one 640x480 image of 16-colour pixels.
// Keeping the image in on-chip block RAM follows the design; the byte
// organisation and the port arrangement are this design's choices.
module frame_buffer #(
  parameter int unsigned DEPTH = 153_600,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [7:0]    b_rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
