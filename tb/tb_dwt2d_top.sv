// tb_dwt2d_top: end-to-end test of the 2-D DWT at N = 16, two levels.
//
// Three images (random pixels, a vertical full-scale edge, a smooth ramp with
// noise) are loaded, transformed and read out back to back. Each read-out
// coefficient is compared with a real-valued 2-D 9/7 reference; the tolerance
// grows with the number of passes the coefficient went through (each pass
// adds at most 1.5 ulp and amplifies earlier error by at most 1.95). The
// quantized value is checked against sign(y)*floor(|y|/step) of the read-out
// coefficient, and the level tags, coef_last and the transform latency
// (sum over levels of 8*len*(len/2+4) clocks, plus 2) are checked too.
// All three run first on the bit-parallel core, then on the digit-serial core
// (ds_mode); for the latter the transform time must lie within the bounds
// set by its word period.
// The test counts and requires: row passes, column passes, passes on the
// LL band of level 2, writes into each frame, symmetric extension at both line
// ends, dead-zone zeros, level-2 values beyond the level-1 range, pairs taken
// by each core, digit-serial write-backs and clocks spent draining the
// digit-serial pipeline.
module tb_dwt2d_top;
  import dwt_ref_pkg::*;

  localparam int N = 16, LEVELS = 2, PIX_W = 8, DF = 4, QN = 8, QS1 = 3;
  localparam int DW = PIX_W + 2 * LEVELS + DF;
  localparam int LW = $clog2(LEVELS + 1);
  localparam int QW = QN + LEVELS - 1;
  localparam int DS_PW = DW + 9;        // word period of the digit-serial core

  logic clk = 1'b0;
  logic rst_n, pix_valid, start, ds_mode, busy, coef_valid, coef_last;
  logic signed [PIX_W-1:0] pix_data;
  logic signed [DW-1:0] coef;
  logic [LW-1:0] coef_level;
  logic signed [QW-1:0] q;
  int checks = 0, failures = 0;


  // Mechanism counters.
  int n_row_pass = 0, n_col_pass = 0, n_lvl2_pass = 0, n_wr_f0 = 0, n_wr_f1 = 0;
  int n_ext_lo = 0, n_ext_hi = 0, n_dead = 0, n_wide = 0;
  int n_bp_take = 0, n_ds_take = 0, n_ds_wr = 0, n_drain = 0;

  dwt2d_top #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_ctrl.pair_done && dut.u_ctrl.tcnt == 0 && dut.u_ctrl.line == 0) begin
      if (dut.u_ctrl.col_pass) n_col_pass++; else n_row_pass++;
      if (dut.u_ctrl.lvl == 1) n_lvl2_pass++;
    end
    if (dut.ctrl1.en && dut.ctrl1.we && dut.u_ctrl.state != dwt_pkg::ST_IDLE) begin
      if (dut.addr1[$bits(dut.addr1)-1]) n_wr_f1++; else n_wr_f0++;
    end
    if (dut.fctrl.en && !dut.fctrl.ds) n_bp_take++;
    if (dut.fctrl.en && dut.fctrl.ds) n_ds_take++;
    if (dut.ctrl1.en && dut.ctrl1.we && dut.fctrl.ds && dut.u_ctrl.state != dwt_pkg::ST_IDLE) n_ds_wr++;
    if (dut.u_ctrl.state == dwt_pkg::ST_DRAIN) n_drain++;
    if (dut.ctrl0.en && dut.u_ctrl.even_idx < 0) n_ext_lo++;
    if (dut.ctrl0.en && dut.u_ctrl.odd_idx > $signed({1'b0, dut.u_ctrl.len}) - 1) n_ext_hi++;
  end

  function automatic int level_at(int r, int c);
    for (int l = 1; l <= LEVELS; l++)
      if (r >= (N >> l) || c >= (N >> l)) return l;
    return LEVELS;
  endfunction

  function automatic real tol_ulp(int l);
    real e = 0.0;
    for (int p = 0; p < 2 * l; p++) e = 1.95 * e + 1.5;
    return e;
  endfunction

  function automatic int quant(int c, int l);
    int m, qm, qmax;
    m = (c < 0) ? -c : c;
    qm = m / (1 << (DF + QS1 - (l - 1)));
    qmax = (1 << (QN + l - 2)) - 1;
    if (qm > qmax) qm = qmax;
    return (c < 0) ? -qm : qm;
  endfunction

  task automatic run_image(int kind, bit ds);
    int pix[N * N];
    real img[];
    int t_start, t_first, expect_lat, np, k;
    img = new[N * N];
    for (int i = 0; i < N * N; i++) begin
      int r = i / N, c = i % N;
      case (kind)
        0: pix[i] = $urandom_range(0, 255) - 128;
        1: pix[i] = (c < N / 2 + 3) ? 127 : -128;
        default: pix[i] = (r * 8 + c * 5) % 200 - 100 + $urandom_range(0, 6) - 3;
      endcase
      img[i] = real'(pix[i]);
    end
    image2d(img, N, LEVELS);
    // Load.
    for (int i = 0; i < N * N; i++) begin
      @(negedge clk);
      pix_valid = 1'b1;
      pix_data  = PIX_W'(pix[i]);
    end
    @(negedge clk);
    pix_valid = 1'b0;
    start = 1'b1;
    ds_mode = ds;
    @(posedge clk);
    t_start = $time / 10;
    @(negedge clk);
    start = 1'b0;
    ds_mode = 1'b0;
    checks++;
    if (!busy) begin
      failures++;
      $display("busy not set after start");
    end
    // Bit-parallel: exact. Digit-serial: np pairs of one word period each, plus
    // the wait for the first slot, the core's latency and the write-back.
    expect_lat = 2;
    np = 0;
    for (int l = 0; l < LEVELS; l++) begin
      expect_lat += 8 * (N >> l) * ((N >> l) / 2 + 4);
      np += 2 * (N >> l) * ((N >> l) / 2 + 4);
    end
    // Read-out.
    k = 0;
    while (k < N * N) begin
      @(posedge clk);
      #1;
      if (coef_valid) begin
        int r = k / N, c = k % N, l;
        real err;
        if (k == 0) begin
          t_first = $time / 10;
          checks++;
          if (!ds && t_first - t_start != expect_lat) begin
            failures++;
            $display("latency %0d clocks, expected %0d", t_first - t_start, expect_lat);
          end
          if (ds && (t_first - t_start < np * DS_PW + 24 || t_first - t_start > np * DS_PW + 2 * DS_PW + 30)) begin
            failures++;
            $display("digit-serial latency %0d clocks, expected about %0d", t_first - t_start, np * DS_PW + 24);
          end
          if (ds) $display("digit-serial transform: %0d clocks for %0d pairs", t_first - t_start, np);
        end
        l = level_at(r, c);
        err = real'(coef) / (2.0 ** DF) - img[k];
        if (err < 0) err = -err;
        checks += 4;
        if (err > tol_ulp(l) / (2.0 ** DF)) begin
          failures++;
          $display("image %0d mode %0d (%0d,%0d): coef %f expected %f", kind, ds, r, c,
                   real'(coef) / (2.0 ** DF), img[k]);
        end
        if (int'(coef_level) != l) begin
          failures++;
          $display("(%0d,%0d): level %0d expected %0d", r, c, coef_level, l);
        end
        if (int'(q) != quant(int'(coef), l)) begin
          failures++;
          $display("(%0d,%0d): q %0d expected %0d", r, c, q, quant(int'(coef), l));
        end
        if (coef_last !== (k == N * N - 1)) begin
          failures++;
          $display("coef_last wrong at %0d", k);
        end
        if (q == 0 && coef != 0) n_dead++;
        if (l == 2 && (q > (1 <<< (QN - 1)) - 1 || q < -((1 <<< (QN - 1)) - 1))) n_wide++;
        k++;
      end
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("busy still set after read-out");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    pix_valid = 1'b0;
    pix_data = '0;
    start = 1'b0;
    ds_mode = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      run_image(0, m[0]);
      run_image(1, m[0]);
      run_image(2, m[0]);
    end
    $display("row passes %0d, column passes %0d, level-2 passes %0d", n_row_pass, n_col_pass, n_lvl2_pass);
    $display("writes frame0 %0d frame1 %0d, extension start %0d end %0d", n_wr_f0, n_wr_f1, n_ext_lo, n_ext_hi);
    $display("pairs taken: bit-parallel %0d, digit-serial %0d; digit-serial writes %0d, drain clocks %0d",
             n_bp_take, n_ds_take, n_ds_wr, n_drain);
    $display("dead-zone zeros %0d, level-2 values beyond level-1 range %0d", n_dead, n_wide);
    checks++;
    if (n_row_pass == 0 || n_col_pass == 0 || n_lvl2_pass == 0 || n_wr_f0 == 0 || n_wr_f1 == 0 ||
        n_ext_lo == 0 || n_ext_hi == 0 || n_dead == 0 ||
        n_bp_take == 0 || n_ds_take == 0 || n_ds_wr == 0 || n_drain == 0 || n_wide == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
