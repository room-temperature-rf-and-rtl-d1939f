// tb_pretrig_delay: three channels written in random order into an
// 8-deep per-channel circular buffer.  Every output must be the sample the
// same channel received 8 of its samples earlier, tagged with that
// sample's channel-local index; nothing may come out of a channel before
// its buffer has filled.
module tb_pretrig_delay;
  localparam int NCH = 3, W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic [1:0] in_chan = 0, out_chan;
  logic signed [W-1:0] in_data = 0, out_data;
  logic [31:0] out_time;
  pretrig_delay #(.NCH(NCH), .W(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_chan, .in_data,
    .out_valid, .out_chan, .out_data, .out_time);

  int hist [NCH][$];
  int nout = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int c, x, i;
      c = $urandom_range(0, NCH-1);
      x = $urandom;
      i = hist[c].size();
      hist[c].push_back(x);
      @(negedge clk);
      in_valid = 1; in_chan = 2'(c); in_data = W'(x);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (i < D) begin
        if (out_valid) begin failures++; $display("FAIL output before fill"); end
      end else begin
        nout++;
        if (!out_valid || out_chan != 2'(c) || out_data != W'(hist[c][i-D]) || out_time != 32'(i-D)) begin
          failures++; $display("FAIL ch %0d i %0d got %0d want %0d", c, i, out_data, hist[c][i-D]);
        end
      end
    end
    checks++;
    if (nout < 300) begin failures++; $display("FAIL few outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
