// dwt2d_top: two-level 2-D 9/7 DWT with a bit-parallel and a digit-serial
// lifting core and a dead-zone quantizer.
//
// Structure: a controller, a dual-port buffer of two frames and one 1-D DWT.
// Every pass reads sample pairs out of one frame: data out 0 (even sample)
// feeds the core's s input and data out 1 (odd sample) its d input. The core's
// low-pass and high-pass results go back, one per clock, through the write
// multiplexer into data in of port 1, in the other frame. Row and column passes
// alternate per level and the next level works on the LL quadrant, so the
// finished frame 0 holds, for two levels, LL2 HL2 LH2 HH2 in the top-left
// quadrant and HL1 (top right), LH1 (bottom left), HH1 (bottom right).
// The read-out streams frame 0 in row-major order through the quantizer.
//
// Interface and timing:
//   * Load: while idle, each pix_valid clock writes one signed PIX_W-bit pixel,
//     row-major, into frame 0 (N*N pixels make a frame).
//   * start: a one-clock pulse while idle starts the transform; busy stays high
//     until the read-out ends.
//   * Transform: sum over levels l of 8 * len * (len/2 + 4) clocks,
//     len = N >> l (a row and a column pass per level), with the bit-parallel
//     core; with the digit-serial core, sum over l of 2 * len * (len/2 + 4)
//     pairs of DW+9 clocks, plus at most about three pair times.
//   * Read-out: N*N clocks; coefficient k (row-major) appears on coef_valid
//     with coef (DF fractional bits), its level, its quantized value q and
//     coef_last on the final one, two clocks after it was read.
//
// Buffer words carry DW bits with DF fractional bits. The integer part must
// take the worst-case growth of 2*LEVELS passes; each pass grows the range by
// less than a factor of 2 (L1 norms 1.95 low-pass and 1.84 high-pass), so
// DW - DF >= PIX_W + 2*LEVELS is enough, and the core's extra output bit is
// always a copy of the sign. An assertion checks this on every write.
//
// Two 1-D cores: the 1-D DWT slot holds both the bit-parallel core
// (lifting_dwt_1d) and the digit-serial one (ds_dwt_1d). ds_mode, sampled
// with start, picks the core for that transform: the controller's filter
// enable goes to the chosen core, and the write multiplexer takes its results.
// The digit-serial core takes a pair every DW+9 clocks and the controller
// follows its pace, so that transform is slower (see dwt_controller).
//
// The partition into controller, buffer and 1-D DWT, the two frames, and the
// multiplexers around the core follow the published top-level architecture;
// two levels and 8-bit pixels follow its example; the digit-serial core is
// the published digit-serial 1-D design. The load and read-out interfaces,
// word widths, placing the quantizer on the read-out path and choosing the
// core per transform are this design's choices.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int N      = 256,   // image is N x N pixels
  parameter int LEVELS = 2,     // decomposition levels
  parameter int PIX_W  = 8,     // pixel width (signed)
  parameter int DF     = 4,     // fractional bits of buffer words
  parameter int DW     = PIX_W + 2 * LEVELS + DF,  // buffer word width
  parameter int FI     = DF + 6,                   // core internal fraction bits
  parameter int CF     = 18,                       // constant fraction bits
  parameter int QN     = 8,     // bits of a level-1 quantized coefficient
  parameter int QS1    = 3,     // level-1 quantizer step 2^QS1
  parameter int LW     = $clog2(LEVELS + 1),
  parameter int QW     = QN + LEVELS - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic signed [PIX_W-1:0] pix_data,
  input  logic                    start,
  input  logic                    ds_mode,
  output logic                    busy,
  output logic                    coef_valid,
  output logic signed [DW-1:0]    coef,
  output logic [LW-1:0]           coef_level,
  output logic signed [QW-1:0]    q,
  output logic                    coef_last
);

  localparam int AW = $clog2(2 * N * N);

  logic [AW-1:0] addr0, addr1;
  buf_ctrl_t     ctrl0, ctrl1;
  filter_ctrl_t  fctrl;
  logic [DW-1:0] dout0, dout1, din1;
  logic          rd_valid, rd_last;
  logic [LW-1:0] rd_level;
  logic          ds_pre, ds_in_ready, ds_out_valid;

  dwt_controller #(.N(N), .LEVELS(LEVELS)) u_ctrl (
    .clk, .rst_n, .pix_valid, .start, .busy,
    .addr0, .ctrl0, .addr1, .ctrl1, .fctrl,
    .ds_mode, .ds_pre, .ds_out_valid,
    .rd_valid, .rd_level, .rd_last
  );

  frame_buffer #(.DW(DW), .N(N)) u_buf (
    .clk, .addr0, .ctrl0, .dout0, .addr1, .ctrl1, .din1, .dout1
  );

  // Input split: even sample from port 0, odd sample from port 1.
  logic signed [DW-1:0] s_in, d_in;
  assign s_in = dout0;
  assign d_in = dout1;

  logic signed [DW:0] s_out, d_out, ds_s_out, ds_d_out;

  lifting_dwt_1d #(.DW(DW), .DF(DF), .FI(FI), .CF(CF)) u_dwt (
    .clk, .rst_n, .en(fctrl.en && !fctrl.ds), .s_in, .d_in, .s_out, .d_out
  );

  ds_dwt_1d #(.DW(DW), .DF(DF), .FI(FI), .CF(CF)) u_ds_dwt (
    .clk, .rst_n, .pre_ready(ds_pre), .in_ready(ds_in_ready),
    .in_valid(fctrl.en && fctrl.ds), .s_in, .d_in,
    .out_valid(ds_out_valid), .s_out(ds_s_out), .d_out(ds_d_out)
  );

  // Result of the core in use.
  logic signed [DW:0] lo_res, hi_res;
  assign lo_res = fctrl.ds ? ds_s_out : s_out;
  assign hi_res = fctrl.ds ? ds_d_out : d_out;

  // Write multiplexer into data in of port 1.
  always_comb begin
    unique case (fctrl.wr_sel)
      WR_LOW:  din1 = lo_res[DW-1:0];
      WR_HIGH: din1 = hi_res[DW-1:0];
      default: din1 = {{(DW-PIX_W-DF){pix_data[PIX_W-1]}}, pix_data, {DF{1'b0}}};
    endcase
  end

  // Quantizer on the read-out path.
  deadzone_quantizer #(.DW(DW), .DF(DF), .LEVELS(LEVELS), .QN(QN), .QS1(QS1)) u_quant (
    .clk, .rst_n, .in_valid(rd_valid), .coef(dout1), .level(rd_level),
    .out_valid(coef_valid), .q
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef       <= '0;
      coef_level <= '0;
      coef_last  <= 1'b0;
    end else begin
      coef_last <= rd_last;
      if (rd_valid) begin
        coef       <= dout1;
        coef_level <= rd_level;
      end
    end
  end

  // The digit-serial core is only enabled in its taking clock.
  a_ds_take: assert property (@(posedge clk) disable iff (!rst_n)
    fctrl.en && fctrl.ds |-> ds_in_ready) else $error("digit-serial pair offered outside its slot");

  // The buffer word must hold every result: the dropped bit is a sign copy.
  always_ff @(posedge clk) begin
    if (ctrl1.en && ctrl1.we && fctrl.wr_sel == WR_LOW)
      assert (lo_res[DW] == lo_res[DW-1]) else $error("low-pass result exceeds the buffer word");
    if (ctrl1.en && ctrl1.we && fctrl.wr_sel == WR_HIGH)
      assert (hi_res[DW] == hi_res[DW-1]) else $error("high-pass result exceeds the buffer word");
  end

  initial begin
    assert (DW - DF >= PIX_W + 2 * LEVELS) else $error("DW too small for the growth of the passes");
  end

endmodule
