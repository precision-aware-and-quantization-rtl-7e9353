// frame_buffer: dual-port buffer holding two N x N data frames.
//
// The buffer keeps the raw image, the intermediate results of the row and
// column passes and the final transformed frame. The two frames are used in
// ping-pong fashion: one pass reads one frame while it writes the other.
// Address layout: {frame, row, column}, so frame f starts at f*N*N.
//
// Port 0 is a read port (address 0, control 0, data out 0). Port 1 reads or
// writes (address 1, control 1, data in, data out 1). Reads are synchronous:
// data out appears on the clock edge after the access and holds until the next
// read on that port. A write through port 1 does not update data out 1.
//
// Two frames and two ports follow the buffer's published description; which
// port writes, the one-cycle read latency and the address layout are this
// design's choices. The array has no reset; its contents are defined by writes.
module frame_buffer
  import dwt_pkg::*;
#(
  parameter int DW = 16,                     // word width
  parameter int N  = 256,                    // frame is N x N words
  parameter int AW = $clog2(2 * N * N)       // address width
) (
  input  logic          clk,
  input  logic [AW-1:0] addr0,
  input  buf_ctrl_t     ctrl0,
  output logic [DW-1:0] dout0,
  input  logic [AW-1:0] addr1,
  input  buf_ctrl_t     ctrl1,
  input  logic [DW-1:0] din1,
  output logic [DW-1:0] dout1
);

  localparam int DEPTH = 2 * N * N;

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ctrl0.en) dout0 <= mem[addr0];
  end

  always_ff @(posedge clk) begin
    if (ctrl1.en) begin
      if (ctrl1.we) mem[addr1] <= din1;
      else          dout1      <= mem[addr1];
    end
  end

  // Port 0 has no write path.
  always_ff @(posedge clk) begin
    assert (!(ctrl0.en && ctrl0.we)) else $error("write requested on read-only port 0");
  end

endmodule
