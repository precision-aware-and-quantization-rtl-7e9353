// tb_dwt_controller: cycle-by-cycle check of the controller's schedule.
//
// For N = 16 and two levels the expected port and filter activity is built
// from the schedule's definition: load writes, then per level a row and a
// column pass (frame 0 -> 1 -> 0), each line as len/2+4 symmetric-extended
// pairs of four phases, then the row-major read-out. Every clock the
// controller's outputs are compared with the expected record. Also checked:
// busy, the read-out level tags and rd_last, and the total cycle count.
//
// A third transform runs in digit-serial mode against a stand-in for that
// core (a pair slot every 25 clocks, results 49 clocks after each take). It
// checks that pairs are read only with ds_pre and taken only in the slot after
// it, that the sequence of pair reads and of result writes (address and
// source) equals the bit-parallel run's, that the transform takes between
// pairs*25 and pairs*25 + 75 clocks, that the drain state is used, and the
// read-out as above.
module tb_dwt_controller;
  import dwt_pkg::*;

  localparam int N = 16, LEVELS = 2;
  localparam int AW = $clog2(2 * N * N);
  localparam int LW = $clog2(LEVELS + 1);

  typedef struct {
    bit e0;
    int a0;
    bit e1;
    bit w1;
    int a1;
    bit fen;
    wr_sel_e wsel;
  } act_t;

  logic clk = 1'b0;
  logic rst_n, pix_valid, start, busy;
  logic [AW-1:0] addr0, addr1;
  buf_ctrl_t ctrl0, ctrl1;
  filter_ctrl_t fctrl;
  logic ds_mode = 1'b0, ds_pre, ds_out_valid;
  logic rd_valid, rd_last;
  logic [LW-1:0] rd_level;
  int checks = 0, failures = 0;
  act_t exp_q[$];
  int n_fold_lo = 0, n_fold_hi = 0;

  // Stand-in for the digit-serial core: a pair slot every PW clocks (ds_pre in
  // the clock before the slot) and results LAT clocks after each take.
  localparam int PW = 25, LAT = 49;
  int ecnt = 0;
  logic [LAT-1:0] vsr = '0;
  assign ds_pre       = (ecnt == PW - 2);
  assign ds_out_valid = vsr[LAT-1];
  always @(posedge clk) begin
    ecnt <= (ecnt == PW - 1) ? 0 : ecnt + 1;
    vsr  <= {vsr[LAT-2:0], fctrl.en && fctrl.ds};
  end

  // Buffer traffic of a transform, recorded to compare the two modes.
  typedef struct {
    int a0;
    int a1;
  } rd_t;
  typedef struct {
    int a;
    wr_sel_e sel;
  } wr_t;
  rd_t rd_bp[$], rd_ds[$];
  wr_t wr_bp[$], wr_ds[$];
  bit  rec_bp = 0;
  int  n_drain = 0;

  dwt_controller #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  function automatic int addr_of(int f, int cp, int ln, int k);
    return f * N * N + (cp ? k * N + ln : ln * N + k);
  endfunction

  function automatic act_t idle_act();
    act_t a;
    a = '{e0: 0, a0: 0, e1: 0, w1: 0, a1: 0, fen: 0, wsel: WR_PIXEL};
    return a;
  endfunction

  task automatic build_run();
    act_t a;
    for (int l = 0; l < LEVELS; l++) begin
      int len = N >> l;
      int half = len / 2;
      for (int cp = 0; cp < 2; cp++) begin
        for (int ln = 0; ln < len; ln++) begin
          for (int t = -2; t <= half + 1; t++) begin
            a = idle_act();
            a.e0 = 1; a.a0 = addr_of(cp, cp, ln, mirror(2 * t, len));
            a.e1 = 1; a.a1 = addr_of(cp, cp, ln, mirror(2 * t + 1, len));
            exp_q.push_back(a);
            a = idle_act();
            a.fen = 1;
            exp_q.push_back(a);
            a = idle_act();
            a.wsel = WR_LOW;
            if (t >= 2) begin
              a.e1 = 1; a.w1 = 1; a.a1 = addr_of(1 - cp, cp, ln, t - 2);
            end
            exp_q.push_back(a);
            a = idle_act();
            a.wsel = WR_HIGH;
            if (t >= 2) begin
              a.e1 = 1; a.w1 = 1; a.a1 = addr_of(1 - cp, cp, ln, half + t - 2);
            end
            exp_q.push_back(a);
          end
        end
      end
    end
  endtask

  function automatic int level_at(int r, int c);
    for (int l = 1; l <= LEVELS; l++)
      if (r >= (N >> l) || c >= (N >> l)) return l;
    return LEVELS;
  endfunction

  task automatic compare(act_t e, int cyc);
    bit bad = 0;
    if (ctrl0.en !== e.e0 || ctrl0.we !== 1'b0) bad = 1;
    if (e.e0 && int'(addr0) != e.a0) bad = 1;
    if (ctrl1.en !== e.e1) bad = 1;
    if (e.e1 && (ctrl1.we !== e.w1 || int'(addr1) != e.a1)) bad = 1;
    if (fctrl.en !== e.fen) bad = 1;
    if (e.w1 && fctrl.wr_sel != e.wsel) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("run cycle %0d: got p0 %b/%0d p1 %b%b/%0d fen %b sel %0d, expected p0 %b/%0d p1 %b%b/%0d fen %b sel %0d",
                 cyc, ctrl0.en, addr0, ctrl1.en, ctrl1.we, addr1, fctrl.en, fctrl.wr_sel,
                 e.e0, e.a0, e.e1, e.w1, e.a1, e.fen, e.wsel);
    end
  endtask

  task automatic load_frame();
    int k = 0;
    // Load N*N pixels with gaps.
    while (k < N * N) begin
      @(negedge clk);
      pix_valid = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (pix_valid) begin
        if (!(ctrl1.en && ctrl1.we && int'(addr1) == k && fctrl.wr_sel == WR_PIXEL && !ctrl0.en)) begin
          failures++;
          $display("load %0d: wrong port 1 access", k);
        end
        k++;
      end else if (ctrl1.en) begin
        failures++;
        $display("port 1 active without pix_valid");
      end
    end
    @(negedge clk);
    pix_valid = 1'b0;
  endtask

  task automatic run_once();
    load_frame();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    exp_q = {};
    build_run();
    for (int c = 0; c < exp_q.size(); c++) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("busy low during run");
      end
      compare(exp_q[c], c);
      @(negedge clk);
    end
    rec_bp = 0;
    readout();
  endtask

  task automatic readout();
    for (int i = 0; i < N * N; i++) begin
      checks++;
      if (!(ctrl1.en && !ctrl1.we && int'(addr1) == i && !ctrl0.en)) begin
        failures++;
        if (failures < 10) $display("read-out %0d: wrong port 1 access (addr %0d)", i, addr1);
      end
      @(negedge clk);
      checks += 2;
      if (!rd_valid || int'(rd_level) != level_at(i / N, i % N)) begin
        failures++;
        if (failures < 10) $display("read-out %0d: valid %b level %0d", i, rd_valid, rd_level);
      end
      if (rd_last !== (i == N * N - 1)) begin
        failures++;
        $display("rd_last wrong at %0d", i);
      end
    end
    @(negedge clk);
    checks++;
    if (busy || rd_valid) begin
      failures++;
      $display("controller not idle after read-out");
    end
  endtask

  // Digit-serial mode: the same reads and writes in the same order, paced by
  // the core's slots, followed by the normal read-out.
  task automatic run_ds();
    int cyc = 0;
    int pairs = 0;
    load_frame();
    rd_ds = {};
    wr_ds = {};
    start = 1'b1;
    ds_mode = 1'b1;
    @(negedge clk);
    start = 1'b0;
    ds_mode = 1'b0;
    for (int l = 0; l < LEVELS; l++) pairs += 2 * (N >> l) * ((N >> l) / 2 + 4);
    while (dut.state != ST_READOUT && cyc < 3 * pairs * PW) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc < pairs * PW || cyc > pairs * PW + 3 * PW) begin
      failures++;
      $display("digit-serial transform took %0d clocks, expected %0d .. %0d",
               cyc, pairs * PW, pairs * PW + 3 * PW);
    end
    $display("digit-serial transform: %0d pairs in %0d clocks", pairs, cyc);
    readout();
    checks += 2;
    if (rd_ds.size() != rd_bp.size() || rd_ds.size() != pairs) begin
      failures++;
      $display("digit-serial mode read %0d pairs, bit-parallel %0d", rd_ds.size(), rd_bp.size());
    end else begin
      foreach (rd_ds[i]) if (rd_ds[i] != rd_bp[i]) begin
        failures++;
        $display("pair read %0d differs: %0d/%0d against %0d/%0d",
                 i, rd_ds[i].a0, rd_ds[i].a1, rd_bp[i].a0, rd_bp[i].a1);
        break;
      end
    end
    if (wr_ds.size() != wr_bp.size()) begin
      failures++;
      $display("digit-serial mode wrote %0d words, bit-parallel %0d", wr_ds.size(), wr_bp.size());
    end else begin
      foreach (wr_ds[i]) if (wr_ds[i] != wr_bp[i]) begin
        failures++;
        $display("write %0d differs: %0d/%0d against %0d/%0d",
                 i, wr_ds[i].a, wr_ds[i].sel, wr_bp[i].a, wr_bp[i].sel);
        break;
      end
    end
  endtask

  // Record the traffic of both modes; in digit-serial mode the filter enable
  // must come only in the slot after ds_pre.
  logic pre_q = 1'b0;
  always @(posedge clk) begin
    pre_q <= ds_pre;
    if (dut.state == ST_RUN || dut.state == ST_DRAIN) begin
      if (ctrl0.en) begin
        if (fctrl.ds) rd_ds.push_back('{a0: int'(addr0), a1: int'(addr1)});
        else if (rec_bp) rd_bp.push_back('{a0: int'(addr0), a1: int'(addr1)});
      end
      if (ctrl1.en && ctrl1.we) begin
        if (fctrl.ds) wr_ds.push_back('{a: int'(addr1), sel: fctrl.wr_sel});
        else if (rec_bp) wr_bp.push_back('{a: int'(addr1), sel: fctrl.wr_sel});
      end
      if (fctrl.ds && fctrl.en) begin
        checks++;
        if (!pre_q) begin
          failures++;
          $display("digit-serial pair taken outside its slot");
        end
      end
      if (fctrl.ds && ctrl0.en) begin
        checks++;
        if (!ds_pre) begin
          failures++;
          $display("digit-serial pair read without ds_pre");
        end
      end
    end
    if (dut.state == ST_DRAIN) n_drain++;
  end

  // Count folded (extended) reads at the line ends.
  always @(posedge clk) begin
    if (ctrl0.en && dut.even_idx < 0) n_fold_lo++;
    if (ctrl1.en && !ctrl1.we && dut.state == ST_RUN && dut.odd_idx > $signed({1'b0, dut.len}) - 1) n_fold_hi++;
  end

  initial begin
    rst_n = 1'b0;
    pix_valid = 1'b0;
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy) begin
      failures++;
      $display("busy after reset");
    end
    rec_bp = 1;
    run_once();
    run_once();
    run_ds();
    checks += 2;
    if (n_drain == 0) begin
      failures++;
      $display("drain state never used");
    end
    if (n_fold_lo == 0 || n_fold_hi == 0) begin
      failures++;
      $display("extension at line ends never used");
    end
    $display("folded reads: start %0d end %0d, drain clocks %0d", n_fold_lo, n_fold_hi, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
