// tb_demod_fir: first checks the reset coefficients (16-point moving
// average: a constant input settles to itself), then loads random taps and
// sends random samples to random channels, comparing each output with
// sum_t h[t]*x_c[n-t] >>> 17 (saturated) from a per-channel history kept
// here.  Checks the one-clock latency and the channel tag.
module tb_demod_fir;
  import lxm_pkg::*;
  localparam int NCH = 4, T = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, wr_en = 0, out_valid;
  logic [1:0] in_chan = 0, out_chan;
  logic [3:0] wr_addr = 0;
  logic signed [17:0] wr_data = 0;
  cplx_t x = '0, y;
  demod_fir #(.NCH(NCH)) dut (.clk, .rst_n, .in_valid, .in_chan, .in_data(x), .wr_en, .wr_addr, .wr_data,
    .out_valid, .out_chan, .out_data(y));

  longint h [T];
  longint hr [NCH][T];
  longint hi [NCH][T];

  function automatic longint sat(input longint v);
    longint s = v >>> 17;
    if (s > 131071) return 131071;
    if (s < -131072) return -131072;
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) for (int t = 0; t < T; t++) begin hr[c][t] = 0; hi[c][t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // moving average of a constant
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); in_valid = 1; in_chan = 2'd1; x.re = 18'sd3200; x.im = -18'sd1600;
      @(negedge clk); in_valid = 0;
      if (n >= 15) begin
        checks++;
        if (y.re != 18'sd3200 || y.im != -18'sd1600 || out_chan != 2'd1) begin failures++; $display("FAIL average %0d", y.re); end
      end
    end
    for (int t = 0; t < T; t++) hr[1][t] = 3200;
    for (int t = 0; t < T; t++) hi[1][t] = -1600;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      h[t] = longint'($urandom_range(0, 40000)) - 20000;
      wr_en = 1; wr_addr = 4'(t); wr_data = 18'(h[t]);
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      int c;
      longint er, ei;
      c = $urandom_range(0, NCH-1);
      for (int t = T-1; t > 0; t--) begin hr[c][t] = hr[c][t-1]; hi[c][t] = hi[c][t-1]; end
      x.re = 18'($signed($urandom_range(0, 200000)) - 100000);
      x.im = 18'($signed($urandom_range(0, 200000)) - 100000);
      hr[c][0] = longint'(x.re); hi[c][0] = longint'(x.im);
      in_chan = 2'(c); in_valid = 1;
      @(negedge clk); in_valid = 0;
      er = 0; ei = 0;
      for (int t = 0; t < T; t++) begin er += h[t] * hr[c][t]; ei += h[t] * hi[c][t]; end
      checks++;
      if (!out_valid || out_chan != 2'(c) || longint'(y.re) != sat(er) || longint'(y.im) != sat(ei)) begin
        failures++; $display("FAIL n=%0d ch %0d got %0d want %0d", n, c, y.re, sat(er));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
