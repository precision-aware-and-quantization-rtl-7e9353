// tb_frame_buffer: self-checking test of the two-frame dual-port buffer.
//
// Fills both frames (N = 8) with random words through port 1, then reads random
// addresses on both ports in the same clock and compares with a model array.
// Checks the one-clock read latency, that data out holds between reads, and
// that a write through port 1 leaves data out 1 unchanged.
module tb_frame_buffer;
  import dwt_pkg::*;

  localparam int DW = 16;
  localparam int N  = 8;
  localparam int AW = $clog2(2 * N * N);
  localparam int DEPTH = 2 * N * N;

  logic clk = 1'b0;
  logic [AW-1:0] addr0, addr1;
  buf_ctrl_t ctrl0, ctrl1;
  logic [DW-1:0] dout0, dout1, din1;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer #(.DW(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    ctrl0 = '{en: 1'b0, we: 1'b0};
    ctrl1 = '{en: 1'b0, we: 1'b0};
    addr0 = '0;
    addr1 = '0;
    din1  = '0;
    // Fill both frames.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addr1 = AW'(a);
      din1  = DW'($urandom);
      model[a] = din1;
      ctrl1 = '{en: 1'b1, we: 1'b1};
    end
    @(negedge clk);
    ctrl1 = '{en: 1'b0, we: 1'b0};
    // Simultaneous random reads on both ports.
    for (int i = 0; i < 300; i++) begin
      int a0, a1;
      a0 = $urandom_range(0, DEPTH - 1);
      a1 = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      addr0 = AW'(a0);
      addr1 = AW'(a1);
      ctrl0 = '{en: 1'b1, we: 1'b0};
      ctrl1 = '{en: 1'b1, we: 1'b0};
      @(negedge clk);
      ctrl0 = '{en: 1'b0, we: 1'b0};
      ctrl1 = '{en: 1'b0, we: 1'b0};
      expect_eq("port 0 read", dout0, model[a0]);
      expect_eq("port 1 read", dout1, model[a1]);
      // Hold while idle, even if the address moves.
      addr0 = AW'($urandom);
      addr1 = AW'($urandom);
      @(negedge clk);
      expect_eq("port 0 hold", dout0, model[a0]);
      expect_eq("port 1 hold", dout1, model[a1]);
      // A write on port 1 leaves data out 1 alone and lands in the array.
      if (i % 4 == 0) begin
        int aw;
        logic [DW-1:0] old1;
        aw   = $urandom_range(0, DEPTH - 1);
        old1 = dout1;
        addr1 = AW'(aw);
        din1  = DW'($urandom);
        model[aw] = din1;
        ctrl1 = '{en: 1'b1, we: 1'b1};
        @(negedge clk);
        ctrl1 = '{en: 1'b0, we: 1'b0};
        expect_eq("port 1 data out during write", dout1, old1);
        addr0 = AW'(aw);
        ctrl0 = '{en: 1'b1, we: 1'b0};
        @(negedge clk);
        ctrl0 = '{en: 1'b0, we: 1'b0};
        expect_eq("read back after write", dout0, model[aw]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
