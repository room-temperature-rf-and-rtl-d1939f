// trigger: slope trigger on time-multiplexed sensor channels.
//
// A derivative stage forms d = x[n] - x[n-1] per channel; an edge trigger
// fires when d crosses the threshold in the selected direction:
//   dir = 0 (up):   d[n-1] <  thr  and  d[n] >= thr
//   dir = 1 (down): d[n-1] >  thr  and  d[n] <= thr
// Together this triggers on the leading edge of an x-ray pulse.  The first
// sample of a channel after reset only primes the history.  The sample, its
// derivative and the trigger flag leave one clock later.
//
// Derivative plus edge trigger follow the design; the exact crossing rule
// and the priming of the first sample are this implementation's reading.
module trigger #(
  parameter int NCH = 128,
  parameter int W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W-1:0]     thr,
  input  logic                    dir,
  input  logic                    in_valid,
  input  logic [$clog2(NCH)-1:0]  in_chan,
  input  logic signed [W-1:0]     in_data,
  output logic                    out_valid,
  output logic [$clog2(NCH)-1:0]  out_chan,
  output logic signed [W-1:0]     out_data,
  output logic signed [W-1:0]     out_deriv,
  output logic                    out_trig
);
  logic signed [W-1:0] xp [NCH];
  logic signed [W-1:0] dp [NCH];
  logic [NCH-1:0]      primed;

  logic signed [W-1:0] d;
  logic                hit;
  assign d   = in_data - xp[in_chan];
  assign hit = primed[in_chan] &&
               (dir ? (dp[in_chan] > thr && d <= thr) : (dp[in_chan] < thr && d >= thr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin xp[c] <= '0; dp[c] <= '0; end
      primed <= '0;
      out_valid <= 1'b0; out_chan <= '0; out_data <= '0; out_deriv <= '0; out_trig <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_trig  <= 1'b0;
      if (in_valid) begin
        xp[in_chan]     <= in_data;
        dp[in_chan]     <= primed[in_chan] ? d : '0;
        primed[in_chan] <= 1'b1;
        out_chan        <= in_chan;
        out_data        <= in_data;
        out_deriv       <= primed[in_chan] ? d : '0;
        out_trig        <= hit;
      end
    end
  end
endmodule
