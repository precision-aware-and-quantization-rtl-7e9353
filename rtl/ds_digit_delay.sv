// ds_digit_delay: delay line for a stream of signed digits.
//
// Delays a signed-digit stream by LEN clocks (LEN = 0 is a plain wire). In
// the digit-serial DWT it serves three purposes: with LEN = P (the number of
// digits per word) it is the configurable word delay z^-w, which presents the
// previous word in the current word's time slot; with a few clocks it is an
// alignment register that lines up the binary points of two addends whose
// paths have different latencies; with one clock it is a pipeline register.
// The delay line is cleared by rst_n (active low, asynchronous).
module ds_digit_delay
  import dwt_pkg::*;
#(
  parameter int LEN = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sd_digit_t din,
  output sd_digit_t dout
);

  if (LEN == 0) begin : g_wire
    assign dout = din;
  end else begin : g_line
    sd_digit_t line [LEN];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LEN; i++) line[i] <= '0;
      end else begin
        line[0] <= din;
        for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
      end
    end
    assign dout = line[LEN-1];
  end

endmodule
