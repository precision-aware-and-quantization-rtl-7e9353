// tb_ds_dwt_1d: self-checking test of the digit-serial 1-D 9/7 DWT.
//
// Lines of 32 samples (random, full-scale alternating, full-scale blocks,
// small random) are fed one symmetric-extended pair per word period, four
// pairs before and four after each line, without gaps. Every accepted pair
// must produce one out_valid exactly P + 24 clocks after it was taken; the
// coefficient pair there has index t-2 and is compared with the real-valued
// reference within 2 ulps. A gap (in_valid low) must produce no out_valid,
// and pre_ready must lead in_ready by one clock.
module tb_ds_dwt_1d;
  import dwt_ref_pkg::*;

  localparam int DW = 16;
  localparam int DF = 4;
  localparam int P  = 25;
  localparam int L  = 32;
  localparam int LAT = P + 24;
  localparam real ULP = 1.0 / (2.0 ** DF);
  localparam real TOL = 2.0 * ULP;

  logic clk = 1'b0;
  logic rst_n, pre_ready, in_ready, in_valid, out_valid;
  logic pre_q = 1'b0;
  logic signed [DW-1:0] s_in, d_in;
  logic signed [DW:0]   s_out, d_out;
  int checks = 0, failures = 0;
  real max_err = 0.0;
  longint cyc = 0;

  // Expected outputs, one per accepted pair: index valid flag, values, due time.
  typedef struct {
    bit     use_it;
    real    lo;
    real    hi;
    longint due;
  } exp_t;
  exp_t exp_q[$];

  ds_dwt_1d #(.DW(DW), .DF(DF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pre_ready must lead in_ready by exactly one clock.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready != pre_q) begin
        failures++;
        $display("pre_ready/in_ready out of step at clock %0d", cyc);
      end
    end
    pre_q <= pre_ready;
  end

  // Output monitor.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected out_valid at %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        if (cyc != e.due) begin
          failures++;
          $display("output at clock %0d, expected at %0d", cyc, e.due);
        end
        if (e.use_it) begin
          real es, ed;
          es = real'(s_out) * ULP - e.lo;
          ed = real'(d_out) * ULP - e.hi;
          if (es < 0) es = -es;
          if (ed < 0) ed = -ed;
          if (es > max_err) max_err = es;
          if (ed > max_err) max_err = ed;
          checks += 2;
          if (es > TOL || ed > TOL) begin
            failures++;
            $display("got %f/%f expected %f/%f", real'(s_out) * ULP, real'(d_out) * ULP, e.lo, e.hi);
          end
        end
      end
    end
  end

  task automatic feed_pair(logic signed [DW-1:0] s, logic signed [DW-1:0] d, bit use_it, real lo, real hi);
    exp_t e;
    // Wait for the accepting clock.
    while (1) begin
      @(negedge clk);
      if (in_ready) break;
    end
    in_valid = 1'b1;
    s_in = s;
    d_in = d;
    @(posedge clk);
    e.use_it = use_it;
    e.lo = lo;
    e.hi = hi;
    e.due = cyc + longint'(LAT);
    exp_q.push_back(e);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic run_line(int kind);
    logic signed [DW-1:0] raw[L];
    real_q x, lo, hi;
    for (int i = 0; i < L; i++) begin
      case (kind)
        0: raw[i] = DW'($urandom);
        1: raw[i] = (i % 2 == 0) ? {1'b0, {(DW-1){1'b1}}} : {1'b1, {(DW-1){1'b0}}};
        2: raw[i] = ((i / 3) % 2 == 0) ? {1'b1, {(DW-1){1'b0}}} : {1'b0, {(DW-1){1'b1}}};
        default: raw[i] = DW'($urandom_range(0, 4095)) - DW'(2048);
      endcase
      x.push_back(real'(raw[i]) * ULP);
    end
    line(x, lo, hi);
    for (int t = -2; t <= L / 2 + 1; t++)
      feed_pair(raw[fold(2 * t, L)], raw[fold(2 * t + 1, L)], t >= 2,
                (t >= 2) ? lo[t-2] : 0.0, (t >= 2) ? hi[t-2] : 0.0);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    s_in = '0;
    d_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) run_line(k);
    for (int n = 0; n < 8; n++) run_line((n % 2 == 0) ? 0 : 3);
    // A gap: nothing is accepted, nothing may come out for it.
    repeat (3 * P) @(negedge clk);
    run_line(0);
    repeat (LAT + P) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("max error %f ulp", max_err / ULP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
