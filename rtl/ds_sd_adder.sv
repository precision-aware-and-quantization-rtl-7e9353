// ds_sd_adder: radix-2 signed-digit adder, most significant digit first.
//
// Adds two digit streams that carry words of P digits each, with equal digit
// weights in the same clock. No carry propagates: each position's digit sum
// p = x + y (-2..2) is split into a transfer t and an interim digit w
// (p = 2t + w), where the choice depends on the sign of the next lower
// position's sum, so that w + (transfer from below) always lies in {-1,0,1}.
// The result digit of a position is known once the sums of the two positions
// below it are in, so the online delay is 2; with the output register, result
// digit j leaves 3 clocks after operand digit j arrived.
//
// The transfer out of the top position is folded into the top result digit,
// so the result keeps the operands' word format. This is exact as long as the
// magnitude of the sum stays below the weight of the top digit, which the
// range analysis of the datapath guarantees (an assertion checks it). Digits
// of the next word are never used as lookahead for the current one.
//
// cnt is the global digit counter (0..P-1); OFF is the offset, in clocks, of
// the operand stream against it, so the operand's digit position is
// (cnt - OFF) mod P. The carry-free signed-digit addition follows the
// published digit-serial design; the selection rule and word framing are this
// design's choices.
module ds_sd_adder
  import dwt_pkg::*;
#(
  parameter int P   = 25,
  parameter int OFF = 0,
  parameter int CB  = $clog2(P)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [CB-1:0] cnt,
  input  sd_digit_t x,
  input  sd_digit_t y,
  output sd_digit_t z
);

  localparam int OM = OFF % P;

  // Position of the arriving digits and of the two held ones.
  logic [CB-1:0] pos_c, pos_b, pos_a;
  if (OM == 0) begin : g_pos0
    assign pos_c = cnt;
  end else begin : g_pos
    assign pos_c = (cnt >= CB'(OM)) ? cnt - CB'(OM) : cnt + CB'(P - OM);
  end
  assign pos_b = (pos_c == '0) ? CB'(P - 1) : pos_c - 1'b1;
  assign pos_a = (pos_b == '0) ? CB'(P - 1) : pos_b - 1'b1;

  logic signed [2:0] p_c, p_b, p_a;
  assign p_c = 3'(x) + 3'(y);

  // Transfer and interim digit of a position sum p, given whether the sum of
  // the next lower position is negative.
  function automatic logic signed [2:0] xfer(logic signed [2:0] p, logic lower_neg);
    unique case (p)
      3'sd2:   return 3'sd1;
      -3'sd2:  return -3'sd1;
      3'sd1:   return lower_neg ? 3'sd0 : 3'sd1;
      -3'sd1:  return lower_neg ? -3'sd1 : 3'sd0;
      default: return 3'sd0;
    endcase
  endfunction

  logic signed [2:0] nxt_b, nxt_a, t_b, w_a, z_a;
  always_comb begin
    // Lookahead never crosses into the next word.
    nxt_b = (pos_c == '0) ? 3'sd0 : p_c;
    nxt_a = (pos_b == '0) ? 3'sd0 : p_b;
    t_b   = (pos_b == '0) ? 3'sd0 : xfer(p_b, nxt_b < 0);
    w_a   = p_a - 3'(xfer(p_a, nxt_a < 0) <<< 1);
    // The top position keeps its own transfer: 2t + w = p.
    z_a   = ((pos_a == '0) ? p_a : w_a) + t_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_b <= '0;
      p_a <= '0;
      z   <= '0;
    end else begin
      p_b <= p_c;
      p_a <= p_b;
      z   <= 2'(z_a);
    end
  end

  a_digit_range: assert property (@(posedge clk) disable iff (!rst_n)
    z_a >= -3'sd1 && z_a <= 3'sd1) else $error("signed-digit sum out of range");

endmodule
