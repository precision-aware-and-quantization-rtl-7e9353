// tb_ds_converters: self-checking test of the word/digit converters and the
// digit delay line.
//
// Three chains run side by side, each serializer -> delay line ->
// deserializer, with delays of 0 (wire), 3 clocks (alignment register) and P
// clocks (one word, z^-w). Random words, full-scale extremes, -1 LSB, and
// zero words (load low) are sent back to back. Each deserializer must return
// exactly the loaded word (sign-extended to DW+1 bits) with a one-clock done
// pulse P + delay clocks after the load; done pulses once per word period, at
// no other clock.
module tb_ds_converters;
  import dwt_pkg::*;

  localparam int DW = 16;
  localparam int DF = 4;
  localparam int E  = 14;
  localparam int FI = 10;
  localparam int P  = E + FI + 1;
  localparam int CB = $clog2(P);
  localparam int NW = 150;
  localparam int NCH = 3;
  localparam int DL [NCH] = '{0, 3, P};

  logic clk = 1'b0;
  logic rst_n;
  logic [CB-1:0] cnt;
  logic load;
  logic signed [DW-1:0] word_in;
  sd_digit_t dig;
  sd_digit_t dly [NCH];
  logic done [NCH];
  logic signed [DW:0] word_out [NCH];
  int checks = 0, failures = 0;

  logic signed [DW-1:0] words [NW];
  bit loads [NW];

  ds_serializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P)) u_ser (
    .clk, .rst_n, .cnt, .load, .word(word_in), .digit(dig));

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    ds_digit_delay #(.LEN(DL[c])) u_dly (.clk, .rst_n, .din(dig), .dout(dly[c]));
    ds_deserializer #(.DW(DW), .DF(DF), .E(E), .FI(FI), .P(P), .OFF(DL[c])) u_des (
      .clk, .rst_n, .cnt, .digit(dly[c]), .done(done[c]), .word(word_out[c]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NW + 4) * P + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    for (int w = 0; w < NW; w++) begin
      loads[w] = (w % 7 != 5);
      case (w)
        0: words[w] = {1'b0, {(DW-1){1'b1}}};
        1: words[w] = {1'b1, {(DW-1){1'b0}}};
        2: words[w] = '1;
        3: words[w] = 16'sd1;
        default: words[w] = DW'($urandom);
      endcase
    end
    rst_n = 1'b0;
    cnt = '0;
    load = 1'b0;
    word_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < (NW + 3) * P; n++) begin
      cnt = CB'(n % P);
      k = n / P;
      load = (n % P == P - 1) && k < NW && loads[k];
      word_in = (k < NW) ? words[k] : '0;
      @(posedge clk);
      #1;
      for (int c = 0; c < NCH; c++) begin
        int m, w;
        m = n - DL[c];
        w = (m + 1) / P - 2;
        checks++;
        if (m >= 0 && m % P == P - 1 && w >= 0 && w < NW) begin
          logic signed [DW:0] expv;
          expv = loads[w] ? (DW+1)'(words[w]) : '0;
          if (!done[c] || word_out[c] != expv) begin
            failures++;
            $display("chain %0d word %0d: done=%b got %0d expected %0d", c, w, done[c], word_out[c], expv);
          end
        end else if (done[c] != ((m + P) % P == P - 1)) begin
          failures++;
          $display("chain %0d: done=%b at clock %0d", c, done[c], n);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
