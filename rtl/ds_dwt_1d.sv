// ds_dwt_1d: digit-serial 1-D 9/7 DWT (flipped lifting) with signed-digit,
// most-significant-digit-first arithmetic.
//
// This computes the same flipped lifting structure as lifting_dwt_1d (nodes
// D0..D11, constants C0..C5), but every node is a serial stream of radix-2
// signed digits {-1,0,1}, one digit per clock, most significant first:
//
//   even/odd word -> P2S + TC2SD (ds_serializer)
//     stage 0: D2 = s + s'            D1 = C1*s'          D0 = C0*d'
//     stage 1: D3 = D0 + D2
//     stage 2-3: D4 = (D3 + D3') / 16   D5 = D1 + D4
//     stage 4-5: D7 = (D5 + D5') / 2    D6 = C2*D3'   D8 = C3*D5'   D9 = D6 + D7
//     stage 6-7: D10 = (D9 + D9') / 2   D11 = D8 + D10
//     stage 8: low = C5*D11             high = C4*D9
//   -> SD2TC + S2P (ds_deserializer) -> low/high words
//
// x' is the previous word (a one-word digit delay, z^-w). Signed-digit
// addition has no carry chain, so adders (online delay 2, ds_sd_adder) and
// multipliers (online delay 3, ds_sd_mult) all work most significant digit
// first and produce one digit per clock.
//
// Stream format and timing. All streams share one format: a word is P =
// E+FI+1 digits with weights 2^E .. 2^-FI, where E = DW-DF+2 leaves room for
// the largest node (the sum D3+D3', up to 5.3 times the input range). Each
// operator adds a fixed latency (adder 3 clocks, multiplier 4), so each node
// sits at a fixed digit offset against the global digit counter. Alignment
// delays line up the two addends of every adder. A division by 2^k is free: the
// stream is relabelled k digits earlier and the k digits that would spill into
// the next word are cleared. The low-pass and high-pass streams are aligned at
// offset 23 and converted back.
//
// Interface: one (even, odd) pair is taken every P clocks, in the clock where
// in_ready is high (in_valid low there inserts a zero pair); pre_ready is high
// in the clock before, so that a buffer with one clock of read latency can
// be read in time. P + 24 clocks after the clock that took pair t, out_valid
// pulses and s_out/d_out (DW+1 bits, DF fractional bits) carry the
// coefficients of index t-2, as in the bit-parallel core; they hold for P
// clocks. A zero pair (in_valid low) gives no out_valid.
//
// The stage partition, the serial/parallel and number-system converters, the
// word delays and the alignment registers follow the published digit-serial
// design. The common stream format, the operator algorithms, latencies and
// the resulting offsets are this design's choices.
module ds_dwt_1d
  import dwt_pkg::*;
#(
  parameter int DW = 16,               // word width
  parameter int DF = 4,                // fractional bits of input/output words
  parameter int FI = 10,               // fractional digits of the streams
  parameter int CF = 18,               // fractional bits of C0..C5
  parameter int E  = DW - DF + 2,      // weight exponent of the top digit
  parameter int P  = E + FI + 1,       // digits per word
  parameter int CB = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 pre_ready,
  output logic                 in_ready,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] s_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 out_valid,
  output logic signed [DW:0]   s_out,
  output logic signed [DW:0]   d_out
);

  localparam int LA = 3;               // adder latency
  localparam int LM = 4;               // multiplier latency
  // Digit offsets of the nodes against the digit counter.
  localparam int O_D2   = LA;                    // 3
  localparam int O_D0   = LM;                    // 4
  localparam int O_D3   = O_D0 + LA;             // 7
  localparam int O_S34  = O_D3 + LA;             // 10
  localparam int O_D4   = O_S34 - 4;             // 6
  localparam int O_D5   = O_D4 + LA;             // 9
  localparam int O_S57  = O_D5 + LA;             // 12
  localparam int O_D7   = O_S57 - 1;             // 11
  localparam int O_D6   = O_D3 + LM;             // 11
  localparam int O_D9   = O_D7 + LA;             // 14
  localparam int O_D8   = O_D5 + LM;             // 13
  localparam int O_S910 = O_D9 + LA;             // 17
  localparam int O_D10  = O_S910 - 1;            // 16
  localparam int O_D11  = O_D10 + LA;            // 19
  localparam int O_LOW  = O_D11 + LM;            // 23
  localparam int O_HIGH = O_D9 + LM;             // 18

  // Global digit counter.
  logic [CB-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= (cnt == CB'(P - 1)) ? '0 : cnt + 1'b1;
  end
  assign in_ready  = (cnt == CB'(P - 1));
  assign pre_ready = (cnt == CB'(P - 2));

  // Digit position of a stream with offset `off`.
  function automatic logic [CB-1:0] pos_of(logic [CB-1:0] c, int off);
    int om = off % P;
    return (c >= CB'(om)) ? c - CB'(om) : c + CB'(P - om);
  endfunction

  // Division by 2^k of a stream at offset `off`: clear the digits that would
  // move into the next word.
  function automatic sd_digit_t shr_mask(sd_digit_t d, logic [CB-1:0] c, int off, int k);
    return (pos_of(c, off) >= CB'(P - k)) ? 2'sb00 : d;
  endfunction

  // Serializers (P2S + TC2SD).
  sd_digit_t s0, d0;
  ds_serializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P)) u_ser_s (
    .clk, .rst_n, .cnt, .load(in_valid), .word(s_in), .digit(s0));
  ds_serializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P)) u_ser_d (
    .clk, .rst_n, .cnt, .load(in_valid), .word(d_in), .digit(d0));

  // Stage 0.
  sd_digit_t s1, d1, n_d2, n_d1, n_d0;
  ds_digit_delay #(.LEN(P)) u_zs (.clk, .rst_n, .din(s0), .dout(s1));
  ds_digit_delay #(.LEN(P)) u_zd (.clk, .rst_n, .din(d0), .dout(d1));
  ds_sd_adder #(.P(P), .OFF(0)) u_a2 (.clk, .rst_n, .cnt, .x(s0), .y(s1), .z(n_d2));
  ds_sd_mult #(.P(P), .OFF(0), .CF(CF), .K(coef_q(C1, CF))) u_m1 (.clk, .rst_n, .cnt, .x(s1), .z(n_d1));
  ds_sd_mult #(.P(P), .OFF(0), .CF(CF), .K(coef_q(C0, CF))) u_m0 (.clk, .rst_n, .cnt, .x(d1), .z(n_d0));

  // Stage 1.
  sd_digit_t d2_al, n_d3;
  ds_digit_delay #(.LEN(O_D0 - O_D2)) u_al2 (.clk, .rst_n, .din(n_d2), .dout(d2_al));
  ds_sd_adder #(.P(P), .OFF(O_D0)) u_a3 (.clk, .rst_n, .cnt, .x(n_d0), .y(d2_al), .z(n_d3));

  // Stages 2-3.
  sd_digit_t d3_q, s34, n_d4, d1_al, n_d5;
  ds_digit_delay #(.LEN(P)) u_z3 (.clk, .rst_n, .din(n_d3), .dout(d3_q));
  ds_sd_adder #(.P(P), .OFF(O_D3)) u_a34 (.clk, .rst_n, .cnt, .x(n_d3), .y(d3_q), .z(s34));
  assign n_d4 = shr_mask(s34, cnt, O_S34, 4);
  ds_digit_delay #(.LEN(O_D4 - LM)) u_al1 (.clk, .rst_n, .din(n_d1), .dout(d1_al));
  ds_sd_adder #(.P(P), .OFF(O_D4)) u_a5 (.clk, .rst_n, .cnt, .x(d1_al), .y(n_d4), .z(n_d5));

  // Stages 4-5.
  sd_digit_t d5_q, s57, n_d7, n_d6, n_d8, n_d9;
  ds_digit_delay #(.LEN(P)) u_z5 (.clk, .rst_n, .din(n_d5), .dout(d5_q));
  ds_sd_adder #(.P(P), .OFF(O_D5)) u_a57 (.clk, .rst_n, .cnt, .x(n_d5), .y(d5_q), .z(s57));
  assign n_d7 = shr_mask(s57, cnt, O_S57, 1);
  ds_sd_mult #(.P(P), .OFF(O_D3), .CF(CF), .K(coef_q(C2, CF))) u_m2 (.clk, .rst_n, .cnt, .x(d3_q), .z(n_d6));
  ds_sd_mult #(.P(P), .OFF(O_D5), .CF(CF), .K(coef_q(C3, CF))) u_m3 (.clk, .rst_n, .cnt, .x(d5_q), .z(n_d8));
  ds_sd_adder #(.P(P), .OFF(O_D7)) u_a9 (.clk, .rst_n, .cnt, .x(n_d6), .y(n_d7), .z(n_d9));

  // Stages 6-7.
  sd_digit_t d9_q, s910, n_d10, d8_al, n_d11;
  ds_digit_delay #(.LEN(P)) u_z9 (.clk, .rst_n, .din(n_d9), .dout(d9_q));
  ds_sd_adder #(.P(P), .OFF(O_D9)) u_a910 (.clk, .rst_n, .cnt, .x(n_d9), .y(d9_q), .z(s910));
  assign n_d10 = shr_mask(s910, cnt, O_S910, 1);
  ds_digit_delay #(.LEN(O_D10 - O_D8)) u_al8 (.clk, .rst_n, .din(n_d8), .dout(d8_al));
  ds_sd_adder #(.P(P), .OFF(O_D10)) u_a11 (.clk, .rst_n, .cnt, .x(d8_al), .y(n_d10), .z(n_d11));

  // Stage 8: scaling and alignment of the two outputs.
  sd_digit_t low_sd, high_sd, high_al;
  ds_sd_mult #(.P(P), .OFF(O_D11), .CF(CF), .K(coef_q(C5, CF))) u_m5 (.clk, .rst_n, .cnt, .x(n_d11), .z(low_sd));
  ds_sd_mult #(.P(P), .OFF(O_D9), .CF(CF), .K(coef_q(C4, CF))) u_m4 (.clk, .rst_n, .cnt, .x(n_d9), .z(high_sd));
  ds_digit_delay #(.LEN(O_LOW - O_HIGH)) u_alh (.clk, .rst_n, .din(high_sd), .dout(high_al));

  // SD2TC + S2P.
  logic done_s, done_d;
  ds_deserializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P), .OFF(O_LOW)) u_des_s (
    .clk, .rst_n, .cnt, .digit(low_sd), .done(done_s), .word(s_out));
  ds_deserializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P), .OFF(O_LOW)) u_des_d (
    .clk, .rst_n, .cnt, .digit(high_al), .done(done_d), .word(d_out));

  // Word-valid flag, carried along the O_LOW-clock path of the data.
  logic              word_valid;
  logic [O_LOW-1:0]  vline;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      vline      <= '0;
      out_valid  <= 1'b0;
    end else begin
      if (in_ready) word_valid <= in_valid;
      vline     <= {vline[O_LOW-2:0], word_valid};
      out_valid <= (pos_of(cnt, O_LOW) == CB'(P - 1)) && vline[O_LOW-1];
    end
  end

  // Both converters finish together.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) done_s == done_d)
    else $error("output streams misaligned");

  // The two addends of D9 arrive aligned without a delay.
  initial begin
    assert (O_D6 == O_D7) else $error("D6 and D7 misaligned");
  end

endmodule
