// tb_cic_decim: two interleaved channels of random samples through the
// second-order CIC decimator by 4.  Its impulse response is the boxcar of
// 4 convolved with itself, [1 2 3 4 3 2 1]; each output k of a channel
// must equal floor(sum_j h[j]*x[4k+3-j] / 16), computed here as a direct
// FIR.  Checks one output per 4 inputs per channel and that a constant
// input comes back unchanged (unity DC gain).
module tb_cic_decim;
  localparam int NCH = 2, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic [0:0] in_chan = 0, out_chan;
  logic signed [W-1:0] in_data = 0, out_data;
  cic_decim #(.NCH(NCH), .W(W), .R(4), .ORDER(2)) dut (.clk, .rst_n, .in_valid, .in_chan, .in_data,
    .out_valid, .out_chan, .out_data);

  longint xs [NCH][$];
  int nin [NCH] = '{0, 0};
  int nout [NCH] = '{0, 0};
  int hh [7] = '{1, 2, 3, 4, 3, 2, 1};

  always @(negedge clk) if (out_valid) begin
    int c, k;
    longint acc;
    c = int'(out_chan);
    k = nout[c];
    acc = 0;
    for (int j = 0; j < 7; j++) begin
      int i;
      i = 4*k + 3 - j;
      if (i >= 0) acc += hh[j] * xs[c][i];
    end
    checks++;
    if (longint'(out_data) != (acc >>> 4)) begin failures++; $display("FAIL ch %0d k %0d got %0d want %0d", c, k, out_data, acc >>> 4); end
    nout[c]++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      int c;
      longint x;
      c = $urandom_range(0, 1);
      x = (n >= 600) ? 12345 : longint'($urandom_range(0, 2000000)) - 1000000;
      xs[c].push_back(x);
      nin[c]++;
      @(negedge clk);
      in_valid = 1; in_chan = 1'(c); in_data = W'(x);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (3) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (nout[c] != nin[c] / 4) begin failures++; $display("FAIL count ch %0d %0d of %0d", c, nout[c], nin[c]); end
    end
    checks++;
    if (out_data != 32'sd12345) begin failures++; $display("FAIL DC gain %0d", out_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
