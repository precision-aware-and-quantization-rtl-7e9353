// tb_ds_sd_mult: self-checking test of the online constant multiplier.
//
// Random signed-digit words (the three top digits left 0 so the product fits
// the word) are streamed back to back into multipliers by the largest
// constant C5 (offset 0) and by the negative constant C2 (offset 11). Each
// result word must lie within one last-digit unit of the exact product
// K * x * 2^-CF and arrive DELTA + 1 = 4 clocks behind the operand. Extreme
// words (all +1, all -1, alternating) and zero words are included.
module tb_ds_sd_mult;
  import dwt_pkg::*;

  localparam int P    = 25;
  localparam int CB   = $clog2(P);
  localparam int CF   = 18;
  localparam int LAT  = 4;
  localparam int OFFB = 11;
  localparam int NW   = 200;
  localparam int NC   = (NW + 2) * P;
  localparam longint KA = coef_q(C5, CF);
  localparam longint KB = coef_q(C2, CF);

  logic clk = 1'b0;
  logic rst_n;
  logic [CB-1:0] cnt;
  sd_digit_t xa, za, xb, zb;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  int dx[NC];

  ds_sd_mult #(.P(P), .OFF(0),    .CF(CF), .K(KA)) dut_a (.clk, .rst_n, .cnt, .x(xa), .z(za));
  ds_sd_mult #(.P(P), .OFF(OFFB), .CF(CF), .K(KB)) dut_b (.clk, .rst_n, .cnt, .x(xb), .z(zb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_digit(int kind, int j);
    if (j < 3) return 0;
    case (kind)
      0: return 1;
      1: return -1;
      2: return (j % 2 == 0) ? 1 : -1;
      3: return 0;
      default: return $urandom_range(0, 2) - 1;
    endcase
  endfunction

  function automatic longint word_val(int n0);
    longint v = 0;
    for (int j = 0; j < P; j++) v = 2 * v + longint'(dx[n0 + j]);
    return v;
  endfunction

  task automatic check_word(string name, longint got, longint k, int n0);
    real expv, err;
    expv = real'(k) * real'(word_val(n0)) / (2.0 ** CF);
    err = real'(got) - expv;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > 1.0) begin
      failures++;
      $display("%s word %0d: got %0d expected %f", name, n0 / P, got, expv);
    end
  endtask

  initial begin
    longint acc_a, acc_b;
    int m, mb;
    for (int w = 0; w < NW; w++)
      for (int j = 0; j < P; j++)
        dx[w * P + j] = rnd_digit((w < 4) ? w : 4, j);
    for (int n = NW * P; n < NC; n++) dx[n] = 0;
    rst_n = 1'b0;
    cnt = '0;
    xa = '0; xb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc_a = 0;
    acc_b = 0;
    for (int n = 0; n < NC; n++) begin
      cnt = CB'(n % P);
      xa = sd_digit_t'(dx[n]);
      xb = (n >= OFFB) ? sd_digit_t'(dx[n - OFFB]) : '0;
      @(posedge clk);
      #1;
      m = n + 1 - LAT;                // operand clock of this result digit
      if (m >= 0) begin
        checks++;
        if (za == 2'sb10 || zb == 2'sb10) begin
          failures++;
          $display("invalid digit at clock %0d", n);
        end
        acc_a = ((m % P) == 0) ? longint'(za) : 2 * acc_a + longint'(za);
        if ((m % P) == P - 1 && m < NW * P) check_word("C5", acc_a, KA, m - P + 1);
        if (m >= OFFB) begin
          mb = m - OFFB;
          acc_b = ((mb % P) == 0) ? longint'(zb) : 2 * acc_b + longint'(zb);
          if ((mb % P) == P - 1 && mb < NW * P) check_word("C2", acc_b, KB, mb - P + 1);
        end
      end
      @(negedge clk);
    end
    $display("max error %f last-digit units", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
