// frame_ram: one-bit-wide image memory with one read port and one write port.
//
// Holds the frame being thinned, one bit per pixel, addressed in raster order
// (address = row * width + column). The read port is synchronous: data for
// rd_addr appears on rd_data one clock after rd_en. A write takes effect at
// the clock edge. The thinning datapath reads ahead of the address it writes
// back, so the two ports never touch the same word in the same cycle. The
// memory contents are not reset; a frame is always loaded before it is read.
module frame_ram #(
  parameter int unsigned DEPTH  = 240 * 160,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_data
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
