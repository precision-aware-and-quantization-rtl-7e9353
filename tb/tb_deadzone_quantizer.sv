// tb_deadzone_quantizer: self-checking test of the dead-zone quantizer.
//
// Random and edge-case coefficients at every level are compared with
// sign(y) * min(floor(|y| / step_l), 2^(QN+l-2) - 1), step_l = 2^(QS1-l+1),
// evaluated in real arithmetic. Checks the one-clock latency of out_valid and
// that the dead zone (|y| < step), ordinary bins and saturation all occur.
module tb_deadzone_quantizer;

  localparam int DW = 16, DF = 4, LEVELS = 2, QN = 8, QS1 = 3;
  localparam int LW = $clog2(LEVELS + 1);
  localparam int QW = QN + LEVELS - 1;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DW-1:0] coef;
  logic [LW-1:0] level;
  logic out_valid;
  logic signed [QW-1:0] q;
  int checks = 0, failures = 0;
  int n_dead = 0, n_bin = 0, n_sat = 0;

  deadzone_quantizer #(.DW(DW), .DF(DF), .LEVELS(LEVELS), .QN(QN), .QS1(QS1)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_q(int c, int l);
    real y, step, m;
    int qm, qmax;
    y    = real'(c) / (2.0 ** DF);
    step = 2.0 ** (QS1 - (l - 1));
    m    = (y < 0) ? -y : y;
    qm   = $rtoi(m / step);     // floor of a non-negative value
    qmax = (1 << (QN + l - 2)) - 1;
    if (qm > qmax) qm = qmax;
    return (y < 0) ? -qm : qm;
  endfunction

  task automatic apply(int c, int l);
    int e;
    @(negedge clk);
    coef     = DW'(c);
    level    = LW'(l);
    in_valid = 1'b1;
    e = expected_q(c, l);
    @(negedge clk);
    in_valid = 1'b0;
    checks += 2;
    if (!out_valid) begin
      failures++;
      $display("out_valid missing one clock after in_valid");
    end
    if (int'(q) != e) begin
      failures++;
      $display("coef %0d level %0d: q %0d expected %0d", c, l, q, e);
    end
    if (e == 0) n_dead++;
    else if (e == (1 << (QN + l - 2)) - 1 || e == -((1 << (QN + l - 2)) - 1)) n_sat++;
    else n_bin++;
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stuck high");
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    coef     = '0;
    level    = LW'(1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Edges of the dead zone and of the first bins at each level.
    for (int l = 1; l <= LEVELS; l++) begin
      int st = 1 << (DF + QS1 - (l - 1));
      apply(0, l);
      apply(st - 1, l);
      apply(-(st - 1), l);
      apply(st, l);
      apply(-st, l);
      apply(2 * st - 1, l);
      apply(2 * st, l);
      apply(-(2 * st) - 1, l);
      apply(32767, l);
      apply(-32768, l);
    end
    for (int i = 0; i < 2000; i++) begin
      int c;
      c = (i % 2 == 0) ? $urandom_range(0, 65535) - 32768 : $urandom_range(0, 8191) - 4096;
      apply(c, $urandom_range(1, LEVELS));
    end
    checks++;
    if (n_dead == 0 || n_bin == 0 || n_sat == 0) begin
      failures++;
      $display("missing case: dead %0d bin %0d sat %0d", n_dead, n_bin, n_sat);
    end
    $display("dead zone %0d, bins %0d, saturated %0d", n_dead, n_bin, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
