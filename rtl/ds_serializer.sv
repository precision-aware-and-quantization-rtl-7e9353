// ds_serializer: parallel-to-serial and two's-complement-to-signed-digit
// conversion for the digit-serial DWT.
//
// A two's complement word (DW bits, DF fractional bits) is loaded in the clock
// where cnt = P-1 and sent out, most significant digit first, during the next
// P clocks: digit j (cnt = j) has weight 2^(E-j), so the word is placed in the
// common stream format with E+1 integer and FI fractional digit positions.
// Positions above the word's sign bit and below its last bit carry 0. The
// sign bit, whose weight is negative in two's complement, becomes the digit
// -1 (when set); every other bit is a digit 0 or +1. No arithmetic is needed.
//
// When `load` is low at the word boundary a zero word is sent. The output
// digit is taken straight from the shift register (offset 0 against cnt).
module ds_serializer
  import dwt_pkg::*;
#(
  parameter int DW = 16,
  parameter int DF = 4,
  parameter int E  = 14,
  parameter int FI = 10,
  parameter int P  = E + FI + 1,
  parameter int CB = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CB-1:0]        cnt,
  input  logic                 load,
  input  logic signed [DW-1:0] word,
  output sd_digit_t            digit
);

  // Digit position of the word's sign bit.
  localparam int SPOS = E - (DW - 1 - DF);

  logic [P-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
    end else if (cnt == CB'(P - 1)) begin
      sreg <= load ? {{SPOS{1'b0}}, word, {(FI-DF){1'b0}}} : '0;
    end else begin
      sreg <= sreg << 1;
    end
  end

  // Two's complement to signed digit.
  assign digit = !sreg[P-1] ? 2'sb00 : (cnt == CB'(SPOS)) ? 2'sb11 : 2'sb01;

  initial begin
    assert (SPOS >= 0 && FI >= DF) else $error("word does not fit the stream format");
  end

endmodule
