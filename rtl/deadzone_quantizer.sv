// deadzone_quantizer: uniform dead-zone scalar quantizer for DWT coefficients.
//
// q = sign(y) * floor(|y| / step). All bins have the width `step` except the
// one around zero, which spans (-step, +step) and so is twice as wide. The step
// is a power of two and halves from one decomposition level to the next, so
// each level gets one more bit of precision: level-1 coefficients are
// quantized to QN bits (sign included), level-2 coefficients to QN+1 bits, and
// so on; the lowest band LL belongs to the last level. Magnitudes beyond the
// level's range saturate.
//
// Interface: `coef` is a signed coefficient with DF fractional bits and
// `level` (1..LEVELS) its decomposition level. The quantized value `q`
// (QN+LEVELS-1 bits, sign-extended) and `out_valid` are registered one clock
// after `in_valid`.
//
// The dead zone of double width and the extra bit per level follow the
// published quantization scheme. The power-of-two steps, the level-1 step
// 2^QS1, QN and the saturation are this design's choices.
module deadzone_quantizer #(
  parameter int DW     = 16,   // coefficient width
  parameter int DF     = 4,    // fractional bits of the coefficient
  parameter int LEVELS = 2,    // decomposition levels
  parameter int QN     = 8,    // bits of a level-1 quantized value
  parameter int QS1    = 3,    // level-1 step is 2^QS1
  parameter int LW     = $clog2(LEVELS + 1),
  parameter int QW     = QN + LEVELS - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] coef,
  input  logic [LW-1:0]        level,
  output logic                 out_valid,
  output logic signed [QW-1:0] q
);

  logic [DW-1:0]        mag;
  logic [DW-1:0]        qmag;
  logic [DW-1:0]        qmax;
  logic signed [QW-1:0] q_next;
  int                   shamt;

  always_comb begin
    mag   = coef[DW-1] ? DW'(-coef) : DW'(coef);
    shamt = DF + QS1 - (int'(level) - 1);
    qmag  = mag >> shamt;
    qmax  = (DW'(1) << (QN + int'(level) - 2)) - DW'(1);
    if (qmag > qmax) qmag = qmax;
    q_next = coef[DW-1] ? -QW'(qmag) : QW'(qmag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q <= q_next;
    end
  end

  initial begin
    assert (DF + QS1 - (LEVELS - 1) >= 0) else $error("step of the last level below one LSB");
    assert (QN + LEVELS - 2 < DW) else $error("QN too large for DW");
  end

endmodule
