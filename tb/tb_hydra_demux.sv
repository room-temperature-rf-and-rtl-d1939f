// tb_hydra_demux: two interleaved channels carry pulses whose rise lasts a
// chosen number of samples (positive derivative from the trigger on).
// With rise-time boundaries 3, 6, 9, 12 the reported pixel must be the
// number of boundaries below the rise time, the event time the channel's
// sample index of the trigger.  Rises longer than RISE_MAX end at RISE_MAX.
// A second instance with HYDRA = 0 must report each trigger at once as
// pixel 0.  Samples must pass through unchanged.
module tb_hydra_demux;
  localparam int NCH = 2, W = 32, NPIX = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] bound [NPIX-1] = '{16'd3, 16'd6, 16'd9, 16'd12};
  logic in_valid = 0, in_trig = 0;
  logic [0:0] in_chan = 0;
  logic signed [W-1:0] in_data = 0, in_deriv = 0;
  logic out_valid, evt_valid, u_out_valid, u_evt_valid;
  logic [0:0] out_chan, evt_chan, u_out_chan, u_evt_chan;
  logic signed [W-1:0] out_data, u_out_data;
  logic [2:0] evt_pix, u_evt_pix;
  logic [31:0] evt_time, u_evt_time;
  hydra_demux #(.NCH(NCH), .W(W), .NPIX(NPIX), .RISE_MAX(14), .HYDRA(1'b1)) dut (.clk, .rst_n, .bound,
    .in_valid, .in_chan, .in_data, .in_deriv, .in_trig, .out_valid, .out_chan, .out_data,
    .evt_valid, .evt_chan, .evt_pix, .evt_time);
  hydra_demux #(.NCH(NCH), .W(W), .NPIX(NPIX), .RISE_MAX(14), .HYDRA(1'b0)) u_nohyd (.clk, .rst_n, .bound,
    .in_valid, .in_chan, .in_data, .in_deriv, .in_trig, .out_valid(u_out_valid), .out_chan(u_out_chan),
    .out_data(u_out_data), .evt_valid(u_evt_valid), .evt_chan(u_evt_chan), .evt_pix(u_evt_pix), .evt_time(u_evt_time));

  int exp_pix [NCH][$];
  int exp_t   [NCH][$];
  int uexp_t  [$];
  int nevt = 0;

  always @(negedge clk) begin
    if (evt_valid) begin
      checks++;
      if (exp_pix[evt_chan].size() == 0) begin failures++; $display("FAIL unexpected event"); end
      else begin
        int p, t;
        p = exp_pix[evt_chan].pop_front(); t = exp_t[evt_chan].pop_front();
        if (int'(evt_pix) != p || int'(evt_time) != t) begin
          failures++; $display("FAIL event ch %0d pix %0d/%0d t %0d/%0d", evt_chan, evt_pix, p, evt_time, t);
        end
      end
      nevt++;
    end
    if (u_evt_valid) begin
      checks++;
      if (uexp_t.size() == 0 || int'(u_evt_time) != uexp_t.pop_front() || u_evt_pix != 0) begin
        failures++; $display("FAIL non-hydra event");
      end
    end
    if (out_valid) begin
      checks++;
      if (out_data != 32'(1000 * int'(out_chan)) + 32'(in_data_d)) begin failures++; $display("FAIL pass-through"); end
    end
  end
  logic signed [W-1:0] in_data_d;
  always @(posedge clk) in_data_d <= in_data - 32'(1000 * int'(in_chan));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx [NCH] = '{0, 0};
    int rise [NCH], pos [NCH];
    int rises [10] = '{1, 3, 4, 6, 7, 10, 12, 13, 20, 5};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 10; e++) begin
      for (int c = 0; c < NCH; c++) begin rise[c] = rises[(e + 3*c) % 10]; pos[c] = -5; end
      // 5 quiet samples, trigger, rise, then fall for 25 samples
      for (int k = 0; k < 5 + 25 + 20; k++)
        for (int c = 0; c < NCH; c++) begin
          int r;
          r = k - 5;
          @(negedge clk);
          in_valid = 1; in_chan = 1'(c); in_trig = (r == 0);
          in_deriv = (r >= 0 && r < rise[c]) ? 32'sd50 : -32'sd3;
          in_data  = 32'(1000 * c + k);
          if (r == 0) begin
            int p, rr;
            rr = rise[c] > 14 ? 14 : rise[c];
            p = 0;
            for (int i = 0; i < NPIX-1; i++) if (rr > int'(bound[i])) p++;
            exp_pix[c].push_back(p); exp_t[c].push_back(idx[c]);
            uexp_t.push_back(idx[c]);
          end
          idx[c]++;
        end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nevt != 20 || exp_pix[0].size() != 0 || exp_pix[1].size() != 0) begin failures++; $display("FAIL events %0d", nevt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
