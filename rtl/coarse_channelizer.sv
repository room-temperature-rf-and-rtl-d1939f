// coarse_channelizer: two polyphase filter bank (PFB) channelizers that
// split the baseband I/Q stream from the ADCs into 2*N channels.
//
// The "thru" channelizer sees the ADC samples as they are; the second one
// sees them shifted down by half a bin.  Each keeps only the +-30 % of a
// bin around its bin centres clean, so together their bin centres sit every
// half bin and any resonator frequency falls near one of them.  Each path
// collects N samples into a frame, filters it with the 8-tap polyphase FIR
// and transforms it with an N-point FFT.  The two bin sets are interleaved
// into one channel frame: channel 2k is thru bin k (frequency k*fs/N),
// channel 2k+1 is shifted bin k (frequency (k+1/2)*fs/N).
//
// Interface: one complex ADC sample (CONV_W bits, placed at the top of the
// DATA_W word) per clock with adc_valid; out_valid pulses once per N
// samples with the whole 2N-channel frame.  Both PFBs share the coefficient
// write port (cfg region lxm_pkg::REG_CHAN, address = coefficient index).
// Latency from the last sample of a frame: log2(N) + 4 clocks.
//
// The thru/shift structure, PFB+FFT and interleaving follow the design.  The
// original runs two samples per 500-MHz clock; this version processes one
// sample per clock of a single clock domain and hands the frame on in
// parallel instead of serializing it.
module coarse_channelizer #(
  parameter int N      = lxm_pkg::N_FFT_MAIN,
  parameter int TAPS   = lxm_pkg::PFB_TAPS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               adc_valid,
  input  logic signed [lxm_pkg::CONV_W-1:0]  adc_i,
  input  logic signed [lxm_pkg::CONV_W-1:0]  adc_q,
  input  lxm_pkg::cfg_t                      cfg,
  output logic                               out_valid,
  output lxm_pkg::cplx_t                     out_chan [2*N]
);
  import lxm_pkg::*;
  localparam int SH = DATA_W - CONV_W;

  cplx_t x, xs;
  logic  xs_v, x_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; x_v <= 1'b0;
    end else begin
      x_v  <= adc_valid;
      x.re <= DATA_W'(adc_i) <<< SH;
      x.im <= DATA_W'(adc_q) <<< SH;
    end
  end

  // half-bin down shift feeding the second channelizer (1 clock, x delayed
  // the same amount so both paths stay frame aligned)
  freq_shift #(.N(N), .SIGN(-1)) u_shift (
    .clk, .rst_n, .in_valid(x_v), .in_data(x), .out_valid(xs_v), .out_data(xs));

  cplx_t x_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) x_d <= '0;
    else        x_d <= x;

  // frame collection
  cplx_t                 fb0 [N];
  cplx_t                 fb1 [N];
  logic [$clog2(N)-1:0]  cnt;
  logic                  f_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; f_v <= 1'b0;
      for (int k = 0; k < N; k++) begin fb0[k] <= '0; fb1[k] <= '0; end
    end else begin
      f_v <= 1'b0;
      if (xs_v) begin
        fb0[cnt] <= x_d;
        fb1[cnt] <= xs;
        cnt      <= cnt + 1'b1;
        f_v      <= (cnt == $clog2(N)'(N-1));
      end
    end
  end

  logic                         cwe;
  logic [$clog2(N*TAPS)-1:0]    caddr;
  logic signed [17:0]           cdat;
  assign cwe   = cfg.we && cfg.addr[23:20] == REG_CHAN;
  assign caddr = cfg.addr[$clog2(N*TAPS)-1:0];
  assign cdat  = cfg.data[17:0];

  cplx_t p0 [N];
  cplx_t p1 [N];
  cplx_t b0 [N];
  cplx_t b1 [N];
  logic  p_v, p1_v, b_v, b1_v;

  pfb_fir #(.N(N), .TAPS(TAPS)) u_pfb0 (.clk, .rst_n, .in_valid(f_v), .in_frame(fb0),
    .wr_en(cwe), .wr_addr(caddr), .wr_data(cdat), .out_valid(p_v), .out_frame(p0));
  pfb_fir #(.N(N), .TAPS(TAPS)) u_pfb1 (.clk, .rst_n, .in_valid(f_v), .in_frame(fb1),
    .wr_en(cwe), .wr_addr(caddr), .wr_data(cdat), .out_valid(p1_v), .out_frame(p1));
  fft #(.N(N), .INVERSE(1'b0)) u_fft0 (.clk, .rst_n, .in_valid(p_v),  .in_frame(p0), .out_valid(b_v),  .out_frame(b0));
  fft #(.N(N), .INVERSE(1'b0)) u_fft1 (.clk, .rst_n, .in_valid(p1_v), .in_frame(p1), .out_valid(b1_v), .out_frame(b1));

  // interleave
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < 2*N; c++) out_chan[c] <= '0;
    end else begin
      out_valid <= b_v & b1_v;
      if (b_v)
        for (int k = 0; k < N; k++) begin
          out_chan[2*k]   <= b0[k];
          out_chan[2*k+1] <= b1[k];
        end
    end
  end
endmodule
