// dwt_controller: sequencing of a multi-level 2-D DWT over a two-frame buffer.
//
// The controller drives the buffer's two ports and the filter control of the
// 1-D DWT. It works in three states:
//
//   ST_IDLE     Each pixel offered on `pix_valid` is written, in row-major
//               order, into frame 0 through port 1 (the write multiplexer
//               selects the pixel). A `start` pulse begins the transform.
//   ST_RUN      For every level l = 0..LEVELS-1 it runs a row pass, then a
//               column pass, over the top-left len x len region
//               (len = N >> l). Each pass reads one frame and writes the other;
//               the passes alternate frame 0 -> 1 -> 0, so every level ends
//               with its results back in frame 0. A line of len samples becomes
//               len/2 low-pass results (first half of the line) and len/2
//               high-pass results (second half).
//   ST_DRAIN    (digit-serial mode only) waits for the core's last results.
//   ST_READOUT  Frame 0 is read in row-major order through port 1; each word
//               comes out on rd_valid one clock later, tagged with its
//               decomposition level for the quantizer.
//
// Line schedule. A line is fed to the 1-D DWT as len/2 + 4 sample pairs,
// t = -2 .. len/2+1, with whole-sample symmetric extension at both ends
// (x[-i] = x[i], x[len-1+i] = x[len-1-i]); this needs len >= 5. Each pair
// takes four clocks (phases):
//   phase 0  port 0 reads x[2t], port 1 reads x[2t+1]
//   phase 1  buffer data valid; filter enable advances the 1-D DWT
//   phase 2  port 1 writes the low-pass result of index t-2 (for t >= 2)
//   phase 3  port 1 writes the high-pass result of index t-2 (for t >= 2)
// A pass over len lines therefore takes 4 * len * (len/2 + 4) clocks, with no
// idle clock between lines, passes or levels.
//
// Digit-serial mode (ds_mode high at start). The digit-serial core takes a
// pair only once per word period and delivers its results much later, so
// the schedule changes:
//   * both ports read x[2t] and x[2t+1] in the clock where ds_pre is high, and
//     the filter enable goes out in the next clock, the core's taking clock;
//   * the destination addresses of that pair's results enter a two-entry
//     queue; when the core signals ds_out_valid, the low and then the high
//     result are written through port 1 in the next clocks where port 1 is
//     not reading;
//   * after the last pair the controller waits in ST_DRAIN until the queue is
//     empty and both writes are done, then starts the read-out.
// A pass then takes len * (len/2 + 4) word periods. The core's pipeline spans
// about two pairs, so results land after the next line or pass has started
// to read; the passes never read those locations that early.
//
// The buffer/filter control split, the row-then-column order and the
// recursion on the LL band follow the published architecture. The four-phase
// schedule, the symmetric extension, the frame ping-pong order, the load and
// read-out sequencing and the digit-serial write-back queue are this design's
// choices.
module dwt_controller
  import dwt_pkg::*;
#(
  parameter int N      = 256,               // image is N x N, N a power of two
  parameter int LEVELS = 2,                 // decomposition levels
  parameter int AW     = $clog2(2 * N * N), // buffer address width
  parameter int LW     = $clog2(LEVELS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // load and start
  input  logic          pix_valid,
  input  logic          start,
  output logic          busy,
  // buffer port 0
  output logic [AW-1:0] addr0,
  output buf_ctrl_t     ctrl0,
  // buffer port 1
  output logic [AW-1:0] addr1,
  output buf_ctrl_t     ctrl1,
  // filter control (1-D DWT enable, core and write multiplexer select)
  output filter_ctrl_t  fctrl,
  // digit-serial core
  input  logic          ds_mode,      // sampled with start: run on the digit-serial core
  input  logic          ds_pre,       // the core takes a pair in the next clock
  input  logic          ds_out_valid, // the core's results of one pair are ready
  // read-out of the transformed frame
  output logic          rd_valid,
  output logic [LW-1:0] rd_level,
  output logic          rd_last
);

  localparam int NB = $clog2(N);      // bits of a row or column index
  localparam int TB = NB + 1;         // bits of a pair counter (0 .. N/2+3)
  localparam int SB = NB + 3;         // signed sample index -4 .. N+3

  ctrl_state_e state;

  logic [NB-1:0]   load_row, load_col;
  logic [LW-1:0]   lvl;               // current level, 0-based
  logic            col_pass;          // 0: row pass, 1: column pass
  logic [NB-1:0]   line;              // row (row pass) or column (column pass)
  logic [TB-1:0]   tcnt;              // pair counter, pair t = tcnt - 2
  logic [1:0]      phase;
  logic [NB-1:0]   ro_row, ro_col;    // read-out position
  logic            mode_ds;           // current transform runs on the digit-serial core

  // Digit-serial mode: write-back tags (destination addresses of the low and
  // high result of a pair, and whether the pair has results) wait in a
  // two-entry queue from the clock the core takes the pair until its results
  // come out; the two writes then go out on the next clocks where port 1 is
  // not needed for a read.
  typedef struct packed {
    logic [AW-1:0] lo;
    logic [AW-1:0] hi;
    logic          ok;
  } wtag_t;
  wtag_t           tq [2];
  logic [1:0]      tq_n;
  logic [AW-1:0]   wr_lo_addr, wr_hi_addr;  // addresses of the results being written
  logic            wr_lo_pend, wr_hi_pend;

  // Derived sizes of the current level.
  logic [NB:0]     len;
  logic [NB:0]     half;
  assign len  = (NB+1)'(N) >> lvl;
  assign half = len >> 1;

  logic src_frame, dst_frame;
  assign src_frame = col_pass;        // row pass reads frame 0, column pass frame 1
  assign dst_frame = ~col_pass;

  // Whole-sample symmetric folding of a sample index into 0..len-1.
  function automatic logic [NB-1:0] fold_idx(logic signed [SB-1:0] i, logic [NB:0] n);
    logic signed [SB-1:0] j;
    if (i < 0)                           j = -i;
    else if (i > $signed(SB'(n) - SB'(1))) j = $signed(SB'(n) << 1) - SB'(2) - i;
    else                                 j = i;
    return j[NB-1:0];
  endfunction

  // Buffer address of sample k of the current line in frame f.
  function automatic logic [AW-1:0] line_addr(logic f, logic cp, logic [NB-1:0] ln,
                                              logic [NB-1:0] k);
    if (cp) return {f, k, ln};
    else    return {f, ln, k};
  endfunction

  logic signed [SB-1:0] even_idx, odd_idx;
  logic [NB-1:0]        m_idx;
  logic                 out_ok;
  assign even_idx = $signed(SB'(tcnt) << 1) - SB'(4);
  assign odd_idx  = even_idx + SB'(1);
  assign m_idx    = NB'(tcnt - TB'(4));
  assign out_ok   = (tcnt >= TB'(4));

  logic last_pair, last_line, last_pass;
  assign last_pair = (tcnt == TB'(half) + TB'(3));
  assign last_line = (line == NB'(len - 1'b1));
  assign last_pass = col_pass && (lvl == LW'(LEVELS - 1));

  // Decomposition level (1..LEVELS) of the read-out position.
  function automatic logic [LW-1:0] level_of(logic [NB-1:0] r, logic [NB-1:0] c);
    logic [LW-1:0] l;
    l = LW'(LEVELS);
    for (int k = LEVELS; k >= 1; k--) begin
      if (r >= NB'(N >> k) || c >= NB'(N >> k)) l = LW'(k);
    end
    return l;
  endfunction

  // Digit-serial mode: read a pair in the clock before the core takes it.
  logic ds_read, ds_take, pair_done;
  assign ds_read   = (state == ST_RUN) && mode_ds && (phase == 2'd0) && ds_pre;
  assign ds_take   = (state == ST_RUN) && mode_ds && (phase == 2'd1);
  assign pair_done = mode_ds ? ds_take : (state == ST_RUN && phase == 2'd3);

  wtag_t new_tag;
  assign new_tag = '{lo: line_addr(dst_frame, col_pass, line, m_idx),
                     hi: line_addr(dst_frame, col_pass, line, NB'(half) + m_idx),
                     ok: out_ok};

  // Outputs.
  always_comb begin
    addr0 = '0;
    ctrl0 = '{en: 1'b0, we: 1'b0};
    addr1 = '0;
    ctrl1 = '{en: 1'b0, we: 1'b0};
    fctrl = '{en: 1'b0, ds: mode_ds, wr_sel: WR_PIXEL};
    unique case (state)
      ST_IDLE: begin
        addr1 = {1'b0, load_row, load_col};
        ctrl1 = '{en: pix_valid, we: 1'b1};
      end
      ST_RUN, ST_DRAIN: begin
        if (mode_ds) begin
          if (ds_read) begin
            addr0 = line_addr(src_frame, col_pass, line, fold_idx(even_idx, len));
            ctrl0 = '{en: 1'b1, we: 1'b0};
            addr1 = line_addr(src_frame, col_pass, line, fold_idx(odd_idx, len));
            ctrl1 = '{en: 1'b1, we: 1'b0};
          end else if (wr_lo_pend) begin
            addr1        = wr_lo_addr;
            ctrl1        = '{en: 1'b1, we: 1'b1};
            fctrl.wr_sel = WR_LOW;
          end else if (wr_hi_pend) begin
            addr1        = wr_hi_addr;
            ctrl1        = '{en: 1'b1, we: 1'b1};
            fctrl.wr_sel = WR_HIGH;
          end
          fctrl.en = ds_take;
        end else begin
        unique case (phase)
          2'd0: begin
            addr0 = line_addr(src_frame, col_pass, line, fold_idx(even_idx, len));
            ctrl0 = '{en: 1'b1, we: 1'b0};
            addr1 = line_addr(src_frame, col_pass, line, fold_idx(odd_idx, len));
            ctrl1 = '{en: 1'b1, we: 1'b0};
          end
          2'd1: begin
            fctrl.en = 1'b1;
          end
          2'd2: begin
            addr1        = line_addr(dst_frame, col_pass, line, m_idx);
            ctrl1        = '{en: out_ok, we: 1'b1};
            fctrl.wr_sel = WR_LOW;
          end
          default: begin
            addr1        = line_addr(dst_frame, col_pass, line, NB'(half) + m_idx);
            ctrl1        = '{en: out_ok, we: 1'b1};
            fctrl.wr_sel = WR_HIGH;
          end
        endcase
        end
      end
      ST_READOUT: begin
        addr1 = {1'b0, ro_row, ro_col};
        ctrl1 = '{en: 1'b1, we: 1'b0};
      end
      default: ;
    endcase
  end

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      load_row <= '0;
      load_col <= '0;
      lvl      <= '0;
      col_pass <= 1'b0;
      line     <= '0;
      tcnt     <= '0;
      phase    <= '0;
      ro_row   <= '0;
      ro_col   <= '0;
      rd_valid <= 1'b0;
      rd_level <= '0;
      rd_last  <= 1'b0;
      mode_ds  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (pix_valid) begin
            load_col <= load_col + 1'b1;
            if (load_col == NB'(N - 1)) load_row <= load_row + 1'b1;
          end
          if (start) begin
            state    <= ST_RUN;
            mode_ds  <= ds_mode;
            lvl      <= '0;
            col_pass <= 1'b0;
            line     <= '0;
            tcnt     <= '0;
            phase    <= '0;
          end
        end
        ST_RUN: begin
          if (!mode_ds)          phase <= phase + 1'b1;
          else if (ds_read)      phase <= 2'd1;
          else if (ds_take)      phase <= 2'd0;
          if (pair_done) begin
            tcnt <= tcnt + 1'b1;
            if (last_pair) begin
              tcnt <= '0;
              line <= line + 1'b1;
              if (last_line) begin
                line     <= '0;
                col_pass <= ~col_pass;
                if (col_pass) lvl <= lvl + 1'b1;
                if (last_pass) begin
                  state  <= mode_ds ? ST_DRAIN : ST_READOUT;
                  ro_row <= '0;
                  ro_col <= '0;
                end
              end
            end
          end
        end
        ST_DRAIN: begin
          if (tq_n == 2'd0 && !wr_lo_pend && !wr_hi_pend) state <= ST_READOUT;
        end
        ST_READOUT: begin
          rd_valid <= 1'b1;
          rd_level <= level_of(ro_row, ro_col);
          ro_col   <= ro_col + 1'b1;
          if (ro_col == NB'(N - 1)) begin
            ro_row <= ro_row + 1'b1;
            if (ro_row == NB'(N - 1)) begin
              rd_last  <= 1'b1;
              state    <= ST_IDLE;
              load_row <= '0;
              load_col <= '0;
            end
          end
        end
      endcase
    end
  end

  // Digit-serial write-back: tag queue and the two pending writes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq[0]      <= '0;
      tq[1]      <= '0;
      tq_n       <= '0;
      wr_lo_addr <= '0;
      wr_hi_addr <= '0;
      wr_lo_pend <= 1'b0;
      wr_hi_pend <= 1'b0;
    end else begin
      unique case ({ds_take, ds_out_valid})
        2'b10: begin
          tq[tq_n[0]] <= new_tag;
          tq_n        <= tq_n + 1'b1;
        end
        2'b01: begin
          tq[0] <= tq[1];
          tq_n  <= tq_n - 1'b1;
        end
        2'b11: begin
          if (tq_n == 2'd1) tq[0] <= new_tag;
          else begin
            tq[0] <= tq[1];
            tq[1] <= new_tag;
          end
        end
        default: ;
      endcase
      if (ds_out_valid) begin
        wr_lo_addr <= tq[0].lo;
        wr_hi_addr <= tq[0].hi;
        wr_lo_pend <= tq[0].ok;
        wr_hi_pend <= tq[0].ok;
      end else if (!ds_read) begin
        if (wr_lo_pend)      wr_lo_pend <= 1'b0;
        else if (wr_hi_pend) wr_hi_pend <= 1'b0;
      end
    end
  end

  a_tq_over:  assert property (@(posedge clk) disable iff (!rst_n)
    ds_take && !ds_out_valid |-> tq_n < 2'd2) else $error("write-back queue overflow");
  a_tq_under: assert property (@(posedge clk) disable iff (!rst_n)
    ds_out_valid |-> tq_n != 2'd0) else $error("digit-serial result without a pair");
  a_wr_done:  assert property (@(posedge clk) disable iff (!rst_n)
    ds_out_valid |-> !wr_lo_pend && !wr_hi_pend) else $error("write-back too slow");

  initial begin
    assert (N == (1 << NB)) else $error("N must be a power of two");
    assert ((N >> (LEVELS - 1)) >= 8) else $error("lines of the last level must hold at least 8 samples");
  end

endmodule
