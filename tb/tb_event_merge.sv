// tb_event_merge: four inputs of four channels each send bursts (all
// inputs on the same clocks, as demodulators do) of known values; every
// sample must come out exactly once, with channel d*CPD + j and its value,
// and no overflow.  A final over-long burst on one input must set the
// sticky overflow flag.
module tb_event_merge;
  localparam int ND = 4, CPD = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid [ND];
  logic [1:0] in_chan [ND];
  logic signed [31:0] in_data [ND];
  logic out_valid, overflow;
  logic [3:0] out_chan;
  logic signed [31:0] out_data;
  event_merge #(.ND(ND), .CPD(CPD), .W(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_chan, .in_data,
    .out_valid, .out_chan, .out_data, .overflow);

  int seen [int];
  int nout = 0;
  always @(negedge clk) if (out_valid) begin
    checks++;
    if (int'(out_data) / 1000 != int'(out_chan)) begin failures++; $display("FAIL chan %0d data %0d", out_chan, out_data); end
    if (seen.exists(int'(out_data))) begin failures++; $display("FAIL duplicate %0d", out_data); end
    seen[int'(out_data)] = 1;
    nout++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < ND; d++) begin in_valid[d] = 0; in_chan[d] = 0; in_data[d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 5; b++) begin
      for (int j = 0; j < CPD; j++) begin
        @(negedge clk);
        for (int d = 0; d < ND; d++) begin
          in_valid[d] = 1; in_chan[d] = 2'(j); in_data[d] = 1000 * (d*CPD + j) + b;
        end
      end
      @(negedge clk);
      for (int d = 0; d < ND; d++) in_valid[d] = 0;
      repeat (20) @(negedge clk);
    end
    checks += 2;
    if (nout != 5 * ND * CPD) begin failures++; $display("FAIL count %0d", nout); end
    if (overflow) begin failures++; $display("FAIL early overflow"); end
    for (int j = 0; j < 12; j++) begin
      @(negedge clk);
      in_valid[0] = 1; in_chan[0] = 2'(j % CPD); in_data[0] = 1000 * (j % CPD) + 500 + j;
      in_valid[1] = 1; in_chan[1] = 2'(j % CPD); in_data[1] = 1000 * (CPD + j % CPD) + 500 + j;
    end
    @(negedge clk); in_valid[0] = 0; in_valid[1] = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
