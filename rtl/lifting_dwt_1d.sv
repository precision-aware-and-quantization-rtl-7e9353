// lifting_dwt_1d: bit-parallel 1-D 9/7 DWT using the flipped lifting structure.
//
// Each enabled clock takes one sample pair (s_in = even sample x[2t],
// d_in = odd sample x[2t+1]) and produces one low-pass and one high-pass
// coefficient. The datapath is the flipped lifting structure: two lifting steps,
// each built from a delay (z^-1) on both rails, a constant multiplier on each
// rail and two adders, with the intermediate nodes D0..D11 named as in the
// structure's usual drawing:
//
//   step 1: D2 = s + s'         D0 = C0*d'        D3 = D0 + D2
//           D1 = C1*s'          D4 = (D3 + D3') >>> 4      D5 = D1 + D4
//   step 2: D6 = C2*D3'         D7 = (D5 + D5') >>> 1      D9 = D6 + D7
//           D8 = C3*D5'         D10 = (D9 + D9') >>> 1     D11 = D8 + D10
//   scale : s_out = C5*D11      d_out = C4*D9
//
// where x' is x delayed by one pair. The flipped form puts no two multipliers
// in series, which shortens the critical path. The result registered after
// pair t is the coefficient pair of index t-2: low-pass K*s2[t-2] and
// high-pass d2[t-2]/K, with K = 1.149604398. A finite line therefore needs
// four leading and four trailing (extended) pairs, which the controller supplies.
//
// Number format. Data are signed fixed point. The inputs have DW bits with DF
// fractional bits (IB = DW-DF integer bits with the sign). Internally every
// node keeps FI fractional bits. Its integer width is IB plus the growth that a
// worst-case (L1-norm) range analysis of the structure gives: +2 for D3, +1 for
// D2, D5, D6 and the outputs, none for the others. Addends share their integer
// width (D0/D2, D1/D4, D6/D7, D8/D10). Products and shifts are truncated
// (rounded toward minus infinity). The outputs have DW+1 bits, one integer bit
// more than the inputs. With FI = DF+6 and CF = 18, the error against exact
// arithmetic stays below 2 output ulps.
//
// The node layout, the shifts and the constants follow the published structure.
// The widths, the truncation, the output register and the reset are this
// design's choices.
//
// Timing: one pair per clock when `en` is high; s_out/d_out change only on an
// enabled clock edge. rst_n is an asynchronous, active-low clear of all delays.
module lifting_dwt_1d
  import dwt_pkg::*;
#(
  parameter int DW = 16,   // input word width
  parameter int DF = 4,    // fractional bits of input and output words
  parameter int FI = 10,   // fractional bits of the internal nodes
  parameter int CF = 18    // fractional bits of the constants C0..C5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] s_in,   // even sample
  input  logic signed [DW-1:0] d_in,   // odd sample
  output logic signed [DW:0]   s_out,  // low-pass coefficient, DF fractional bits
  output logic signed [DW:0]   d_out   // high-pass coefficient, DF fractional bits
);

  localparam int IB = DW - DF;
  localparam int CW = COEF_IB + CF;
  // Width of a node with `g` integer bits of growth over the input.
  localparam int W0 = IB + FI;
  localparam int W1 = IB + 1 + FI;
  localparam int W2 = IB + 2 + FI;
  localparam int W3 = IB + 3 + FI;

  localparam logic signed [CW-1:0] K0 = CW'(coef_q(C0, CF));
  localparam logic signed [CW-1:0] K1 = CW'(coef_q(C1, CF));
  localparam logic signed [CW-1:0] K2 = CW'(coef_q(C2, CF));
  localparam logic signed [CW-1:0] K3 = CW'(coef_q(C3, CF));
  localparam logic signed [CW-1:0] K4 = CW'(coef_q(C4, CF));
  localparam logic signed [CW-1:0] K5 = CW'(coef_q(C5, CF));

  // Inputs aligned to FI fractional bits.
  logic signed [W0-1:0] s_x, d_x;
  assign s_x = {s_in, {(FI-DF){1'b0}}};
  assign d_x = {d_in, {(FI-DF){1'b0}}};

  // Delay registers (z^-1).
  logic signed [W0-1:0] s_q, d_q;
  logic signed [W2-1:0] d3_q;
  logic signed [W1-1:0] d5_q;
  logic signed [W0-1:0] d9_q;

  // Lifting step 1.
  logic signed [W1-1:0]    n_d2, n_d0;
  logic signed [W2-1:0]    n_d3;
  logic signed [W3-1:0]    sum34;
  logic signed [W0-1:0]    n_d1, n_d4;
  logic signed [W1-1:0]    n_d5;
  logic signed [W0+CW-1:0] p0, p1;

  assign n_d2  = s_x + s_q;
  assign p0    = d_q * K0;
  assign n_d0  = p0[CF +: W1];
  assign n_d3  = n_d0 + n_d2;
  assign p1    = s_q * K1;
  assign n_d1  = p1[CF +: W0];
  assign sum34 = n_d3 + d3_q;
  assign n_d4  = W0'(sum34 >>> 4);
  assign n_d5  = n_d1 + n_d4;

  // Lifting step 2.
  logic signed [W2+CW-1:0] p2;
  logic signed [W1+CW-1:0] p3;
  logic signed [W1-1:0]    n_d6, n_d7;
  logic signed [W2-1:0]    sum57;
  logic signed [W0-1:0]    n_d9, n_d8, n_d10, n_d11;
  logic signed [W1-1:0]    sum910;

  assign p2     = d3_q * K2;
  assign n_d6   = p2[CF +: W1];
  assign sum57  = n_d5 + d5_q;
  assign n_d7   = sum57[1 +: W1];
  assign n_d9   = W0'(n_d6 + n_d7);
  assign p3     = d5_q * K3;
  assign n_d8   = p3[CF +: W0];
  assign sum910 = n_d9 + d9_q;
  assign n_d10  = sum910[1 +: W0];
  assign n_d11  = n_d8 + n_d10;

  // Output scaling.
  logic signed [W0+CW-1:0] p4, p5;
  logic signed [W1-1:0]    s_full, d_full;
  assign p5     = n_d11 * K5;
  assign s_full = p5[CF +: W1];
  assign p4     = n_d9 * K4;
  assign d_full = p4[CF +: W1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q   <= '0;
      d_q   <= '0;
      d3_q  <= '0;
      d5_q  <= '0;
      d9_q  <= '0;
      s_out <= '0;
      d_out <= '0;
    end else if (en) begin
      s_q   <= s_x;
      d_q   <= d_x;
      d3_q  <= n_d3;
      d5_q  <= n_d5;
      d9_q  <= n_d9;
      s_out <= s_full[FI-DF +: DW+1];
      d_out <= d_full[FI-DF +: DW+1];
    end
  end

  initial begin
    assert (FI >= DF) else $error("FI must not be smaller than DF");
  end

endmodule
