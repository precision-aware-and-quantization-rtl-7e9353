// ds_sd_mult: online (most significant digit first) multiplier of a
// signed-digit stream by a constant.
//
// The serial operand x (words of P digits, all digits weighted like those of
// the result) is multiplied by the parallel constant K (two's complement, CF
// fractional bits, |K| < 4). The residual recurrence
//     v = 2*w + K * x_j * 2^-DELTA,   z = sel(v),   w = v - z
// with sel(v) = +1 for v >= 1/2, -1 for v <= -1/2 and 0 otherwise, emits one
// result digit per clock, DELTA digits behind the operand. With DELTA = 3 and
// |K| < 4 the residual stays within +-1/2, so every digit is in {-1, 0, 1}.
// The residual is kept exactly (CF + DELTA fractional bits); the only error
// is the residual left after the last digit, below half a digit weight.
//
// Word framing: the first DELTA digits of a word only load a fresh residual;
// during them the residual of the previous word is drained (v = 2*w, no new
// operand digit) to deliver that word's last DELTA result digits. Words can
// therefore follow each other without a gap. The product must stay below the
// weight of the top digit (guaranteed by the datapath's range analysis).
//
// Timing: result digit j leaves DELTA + 1 clocks after operand digit j
// arrived (DELTA online delay plus the output register). cnt and OFF give the
// operand's digit position as in ds_sd_adder. The digit-serial multiplier
// itself is named in the published design; the recurrence, DELTA and the
// framing are this design's choices.
module ds_sd_mult
  import dwt_pkg::*;
#(
  parameter int     P     = 25,
  parameter int     OFF   = 0,
  parameter int     CF    = 18,
  parameter longint K     = 0,
  parameter int     DELTA = 3,
  parameter int     CB    = $clog2(P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CB-1:0] cnt,
  input  sd_digit_t     x,
  output sd_digit_t     z
);

  localparam int OM = OFF % P;
  // Residual in units of 2^-(CF+DELTA) of a result digit weight.
  localparam int RW = CF + DELTA + 4;
  localparam logic signed [RW-1:0] KQ   = RW'(K);
  localparam logic signed [RW-1:0] ONE  = RW'(1) <<< (CF + DELTA);
  localparam logic signed [RW-1:0] HALF = RW'(1) <<< (CF + DELTA - 1);

  logic [CB-1:0] pos;
  if (OM == 0) begin : g_pos0
    assign pos = cnt;
  end else begin : g_pos
    assign pos = (cnt >= CB'(OM)) ? cnt - CB'(OM) : cnt + CB'(P - OM);
  end

  logic signed [RW-1:0] wa, wd;          // accumulating / draining residual
  logic signed [RW-1:0] kx, va, vd, v_sel, wa_n, wd_n;
  logic signed [1:0]    zs;

  always_comb begin
    unique case (x)
      2'sb01:  kx = KQ;
      2'sb11:  kx = -KQ;
      default: kx = '0;
    endcase
    va    = ((pos == '0) ? '0 : (wa <<< 1)) + kx;
    vd    = wd <<< 1;
    v_sel = (pos < CB'(DELTA)) ? vd : va;
    if (v_sel >= HALF)       zs = 2'sb01;
    else if (v_sel <= -HALF) zs = 2'sb11;
    else                     zs = 2'sb00;
    if (pos < CB'(DELTA)) begin
      wa_n = va;
      wd_n = vd - ((zs == 2'sb01) ? ONE : (zs == 2'sb11) ? -ONE : '0);
    end else begin
      wa_n = va - ((zs == 2'sb01) ? ONE : (zs == 2'sb11) ? -ONE : '0);
      wd_n = wa_n;                       // becomes the draining residual after the last digit
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0;
      wd <= '0;
      z  <= '0;
    end else begin
      wa <= wa_n;
      wd <= wd_n;
      z  <= zs;
    end
  end

  a_residual: assert property (@(posedge clk) disable iff (!rst_n)
    pos >= CB'(DELTA) |-> wa_n <= HALF && wa_n >= -HALF)
    else $error("online multiplier residual out of range");

  initial begin
    assert (DELTA < P) else $error("DELTA must be below P");
  end

endmodule
