// ds_deserializer: signed-digit-to-two's-complement and serial-to-parallel
// conversion for the digit-serial DWT.
//
// Collects a word of P signed digits, most significant first, arriving at
// offset OFF against the digit counter. The digits are accumulated as
// acc = 2*acc + digit, which turns the redundant digits into an ordinary two's
// complement number in units of the last digit weight 2^-FI. After the last
// digit the word is rounded down to DF fractional bits and presented as a
// parallel DW+1-bit word on `word`, with a one-clock `done` pulse; it holds
// until the next word completes.
module ds_deserializer
  import dwt_pkg::*;
#(
  parameter int DW  = 16,
  parameter int DF  = 4,
  parameter int E   = 14,
  parameter int FI  = 10,
  parameter int P   = E + FI + 1,
  parameter int OFF = 0,
  parameter int CB  = $clog2(P)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CB-1:0]      cnt,
  input  sd_digit_t          digit,
  output logic               done,
  output logic signed [DW:0] word
);

  localparam int OM = OFF % P;
  localparam int AW = E + FI + 3;

  logic [CB-1:0] pos;
  if (OM == 0) begin : g_pos0
    assign pos = cnt;
  end else begin : g_pos
    assign pos = (cnt >= CB'(OM)) ? cnt - CB'(OM) : cnt + CB'(P - OM);
  end

  logic signed [AW-1:0] acc, acc_n;
  assign acc_n = ((pos == '0) ? '0 : (acc <<< 1)) + AW'(digit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
      word <= '0;
    end else begin
      acc  <= acc_n;
      done <= (pos == CB'(P - 1));
      if (pos == CB'(P - 1)) word <= acc_n[FI-DF +: DW+1];
    end
  end

  initial begin
    assert (AW - (FI - DF) >= DW + 1) else $error("stream format narrower than the output word");
  end

endmodule
