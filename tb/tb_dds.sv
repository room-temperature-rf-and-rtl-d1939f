// tb_dds: programs per-channel frequency words and phase offsets, serves
// the channels round-robin (with one restart) and compares cos/sin with
// AMP*cos/sin of the phase the accumulator must hold, computed here from
// the sample count.  Checks the ITERS + 2 clock latency and the channel tag.
module tb_dds;
  localparam int NCH = 4, AMP = 65536;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, restart = 0, wr_en = 0, wr_sel = 0;
  logic [1:0] in_chan = 0, wr_chan = 0;
  logic [7:0] tag_in = 0, tag_out;
  logic [15:0] wr_data = 0;
  logic out_valid;
  logic signed [17:0] c_o, s_o;

  dds #(.NCH(NCH), .OUT_W(18), .AMP(AMP), .TAG_W(8)) dut (.clk, .rst_n, .in_valid, .in_chan, .restart,
    .tag_in, .wr_en, .wr_sel, .wr_chan, .wr_data, .out_valid, .cos_out(c_o), .sin_out(s_o), .tag_out);

  int unsigned fr [NCH] = '{1000, 7777, 32768, 61000};
  int unsigned of [NCH] = '{0, 16384, 100, 40000};
  int unsigned cnt [NCH];
  int unsigned expph [$];
  int sent_at [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    real ph, ec, es;
    int unsigned p;
    int t;
    p = expph.pop_front();
    t = sent_at.pop_front();
    ph = real'(p & 16'hFFFF) / 65536.0 * TWO_PI;
    ec = AMP * $cos(ph); es = AMP * $sin(ph);
    checks++;
    if ((real'(c_o) - ec) > 24.0 || (real'(c_o) - ec) < -24.0 || (real'(s_o) - es) > 24.0 || (real'(s_o) - es) < -24.0) begin
      failures++; $display("FAIL ph=%0d got %0d %0d want %f %f", p, c_o, s_o, ec, es);
    end
    checks++;
    if (cyc - t != 18) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk); wr_en = 1; wr_sel = 0; wr_chan = 2'(c); wr_data = 16'(fr[c]);
      @(negedge clk); wr_en = 1; wr_sel = 1; wr_chan = 2'(c); wr_data = 16'(of[c]);
    end
    @(negedge clk); wr_en = 0;
    for (int c = 0; c < NCH; c++) cnt[c] = 0;
    for (int n = 0; n < 200; n++) begin
      int c;
      c = n % NCH;
      @(negedge clk);
      in_valid = 1; in_chan = 2'(c); tag_in = 8'(c);
      restart = (n == 101);
      if (restart) cnt[c] = 0;
      expph.push_back(cnt[c] * fr[c] + of[c]);
      sent_at.push_back(cyc);
      cnt[c]++;
      if (n % 7 == 3) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (expph.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
