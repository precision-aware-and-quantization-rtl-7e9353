// tb_ds_sd_adder: self-checking test of the signed-digit online adder.
//
// Random signed-digit words (the two top digits left 0 so the sum fits the
// word) are streamed back to back, most significant digit first, into two
// adders: one at offset 0 and one at offset 7 against the digit counter. Each
// result word must equal the exact sum of its operand words and arrive 3
// clocks behind the operands, every result digit must be a valid signed digit,
// and extreme words (all +1, all -1, alternating) are included.
module tb_ds_sd_adder;
  import dwt_pkg::*;

  localparam int P    = 25;
  localparam int CB   = $clog2(P);
  localparam int LAT  = 3;
  localparam int OFFB = 7;
  localparam int NW   = 200;            // words per operand stream
  localparam int NC   = (NW + 2) * P;   // clocks simulated

  logic clk = 1'b0;
  logic rst_n;
  logic [CB-1:0] cnt;
  sd_digit_t xa, ya, za, xb, yb, zb;
  int checks = 0, failures = 0;

  // Operand digits per clock (index n = clock since start).
  int dx[NC], dy[NC];

  ds_sd_adder #(.P(P), .OFF(0))    dut_a (.clk, .rst_n, .cnt, .x(xa), .y(ya), .z(za));
  ds_sd_adder #(.P(P), .OFF(OFFB)) dut_b (.clk, .rst_n, .cnt, .x(xb), .y(yb), .z(zb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_digit(int kind, int j);
    if (j < 2) return 0;
    case (kind)
      0: return 1;
      1: return -1;
      2: return (j % 2 == 0) ? 1 : -1;
      default: return $urandom_range(0, 2) - 1;
    endcase
  endfunction

  function automatic sd_digit_t enc(int d);
    return sd_digit_t'(d);
  endfunction

  // Value of the word that starts at clock n0, in units of the last digit.
  function automatic longint word_val(ref int d[NC], input int n0);
    longint v = 0;
    for (int j = 0; j < P; j++) v = 2 * v + longint'(d[n0 + j]);
    return v;
  endfunction

  initial begin
    longint acc_a, acc_b;
    int m, mb;
    for (int w = 0; w < NW; w++) begin
      for (int j = 0; j < P; j++) begin
        dx[w * P + j] = rnd_digit((w < 3) ? w : 3, j);
        dy[w * P + j] = rnd_digit((w < 3) ? (w + 1) % 3 : 3, j);
      end
    end
    for (int n = NW * P; n < NC; n++) begin
      dx[n] = 0;
      dy[n] = 0;
    end
    rst_n = 1'b0;
    cnt = '0;
    xa = '0; ya = '0; xb = '0; yb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc_a = 0;
    acc_b = 0;
    for (int n = 0; n < NC; n++) begin
      // Drive clock n (operand B is the same stream, OFFB clocks later).
      cnt = CB'(n % P);
      xa = enc(dx[n]);
      ya = enc(dy[n]);
      xb = (n >= OFFB) ? enc(dx[n - OFFB]) : '0;
      yb = (n >= OFFB) ? enc(dy[n - OFFB]) : '0;
      @(posedge clk);
      #1;
      // After the clock edge of clock n the result digit of clock n-LAT+1 is out.
      m = n + 1 - LAT;                // operand clock of this result digit
      if (m >= 0) begin
        checks++;
        if (za == 2'sb10 || zb == 2'sb10) begin
          failures++;
          $display("invalid digit at clock %0d", n);
        end
        acc_a = ((m % P) == 0) ? longint'(za) : 2 * acc_a + longint'(za);
        if ((m % P) == P - 1 && m < NW * P) begin
          checks++;
          if (acc_a != word_val(dx, m - P + 1) + word_val(dy, m - P + 1)) begin
            failures++;
            $display("A word %0d: got %0d expected %0d", m / P, acc_a,
                     word_val(dx, m - P + 1) + word_val(dy, m - P + 1));
          end
        end
        if (m >= OFFB) begin
          mb = m - OFFB;
          acc_b = ((mb % P) == 0) ? longint'(zb) : 2 * acc_b + longint'(zb);
          if ((mb % P) == P - 1 && mb < NW * P) begin
            checks++;
            if (acc_b != word_val(dx, mb - P + 1) + word_val(dy, mb - P + 1)) begin
              failures++;
              $display("B word %0d: got %0d", mb / P, acc_b);
            end
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
