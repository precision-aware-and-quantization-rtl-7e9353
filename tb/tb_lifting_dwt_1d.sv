// tb_lifting_dwt_1d: self-checking test of the bit-parallel 1-D 9/7 core.
//
// Lines of 32 samples (random, full-scale alternating, constant, zero) are fed
// as symmetric-extended sample pairs, four before and four after the line. The
// coefficient pair of index m must appear in s_out/d_out right after the clock
// that took pair m+2 (two-pair latency). Each coefficient is compared with the
// real-valued reference within 2 ulps (2^-DF each). The test also checks that
// the outputs hold while `en` is low.
module tb_lifting_dwt_1d;
  import dwt_ref_pkg::*;

  localparam int DW = 16;
  localparam int DF = 4;
  localparam int L  = 32;
  localparam real ULP = 1.0 / (2.0 ** DF);
  localparam real TOL = 2.0 * ULP;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [DW-1:0] s_in, d_in;
  logic signed [DW:0]   s_out, d_out;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  lifting_dwt_1d #(.DW(DW), .DF(DF)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_line(input int kind);
    logic signed [DW-1:0] raw[L];
    real_q x, lo, hi;
    logic signed [DW:0] hold_s, hold_d;
    for (int i = 0; i < L; i++) begin
      case (kind)
        0: raw[i] = DW'($urandom);
        1: raw[i] = (i % 2 == 0) ? {1'b0, {(DW-1){1'b1}}} : {1'b1, {(DW-1){1'b0}}};
        2: raw[i] = {1'b1, {(DW-1){1'b0}}};
        3: raw[i] = ((i / 3) % 2 == 0) ? {1'b1, {(DW-1){1'b0}}} : {1'b0, {(DW-1){1'b1}}};
        default: raw[i] = DW'($urandom_range(0, 255)) - DW'(128);
      endcase
      x.push_back(real'(raw[i]) * ULP);
    end
    line(x, lo, hi);
    for (int t = -2; t <= L / 2 + 1; t++) begin
      @(negedge clk);
      en   = 1'b1;
      s_in = raw[fold(2 * t, L)];
      d_in = raw[fold(2 * t + 1, L)];
      @(negedge clk);
      en = 1'b0;
      if (t >= 2) begin
        real es, ed;
        es = real'(s_out) * ULP - lo[t-2];
        ed = real'(d_out) * ULP - hi[t-2];
        if (es < 0) es = -es;
        if (ed < 0) ed = -ed;
        if (es > max_err) max_err = es;
        if (ed > max_err) max_err = ed;
        checks += 2;
        if (es > TOL) begin
          failures++;
          $display("kind %0d low[%0d]: got %f expected %f", kind, t-2, real'(s_out) * ULP, lo[t-2]);
        end
        if (ed > TOL) begin
          failures++;
          $display("kind %0d high[%0d]: got %f expected %f", kind, t-2, real'(d_out) * ULP, hi[t-2]);
        end
      end
    end
    // Outputs must hold while en is low.
    hold_s = s_out;
    hold_d = d_out;
    s_in = DW'($urandom);
    d_in = DW'($urandom);
    repeat (3) @(negedge clk);
    checks++;
    if (s_out !== hold_s || d_out !== hold_d) begin
      failures++;
      $display("outputs changed while en was low");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    s_in  = '0;
    d_in  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (s_out !== '0 || d_out !== '0) begin
      failures++;
      $display("outputs not cleared by reset");
    end
    for (int k = 0; k < 4; k++) check_line(k);
    for (int n = 0; n < 20; n++) check_line(k_any(n));
    $display("max error %f ulp", max_err / ULP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int k_any(int n);
    return (n % 2 == 0) ? 0 : 4;
  endfunction

endmodule
