// dechannelizer: synthesizes the probe-tone comb for the DACs from the
// per-channel tone samples of the demodulators (the tone-generation PFB).
//
// The 2N-channel tone frame from the channel select is de-interleaved:
// even channels form the N bins of the "thru" synthesizer, odd channels the
// bins of the second synthesizer.  Each path runs an N-point IFFT and the
// 8-tap polyphase synthesis FIR, then plays its frame out one sample per
// clock.  The second path is shifted up by half a bin, so its bin k lands
// at (k+1/2)*fs/N, and the two streams are summed and cut to the DAC
// width with saturation.
//
// Interface: in_valid with a 2N-channel frame, at most once every N clocks;
// dac_valid/dac_i/dac_q carry one complex sample per clock while frames
// arrive.  Synthesis coefficients: cfg region lxm_pkg::REG_DECHAN.
// Latency from in_valid to the first sample: log2(N) + 5 clocks.
//
// Structure (deserializer, IFFT, PFB FIR, frequency shift, sum) follows the
// design; the single-clock, one-sample-per-clock form is this version's.
module dechannelizer #(
  parameter int N    = lxm_pkg::N_FFT_MAIN,
  parameter int TAPS = lxm_pkg::PFB_TAPS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  lxm_pkg::cfg_t                      cfg,
  input  logic                               in_valid,
  input  lxm_pkg::cplx_t                     in_chan [2*N],
  output logic                               dac_valid,
  output logic signed [lxm_pkg::CONV_W-1:0]  dac_i,
  output logic signed [lxm_pkg::CONV_W-1:0]  dac_q
);
  import lxm_pkg::*;
  localparam int SH = DATA_W - CONV_W;

  cplx_t bt [N];
  cplx_t bs [N];
  always_comb
    for (int k = 0; k < N; k++) begin
      bt[k] = in_chan[2*k];
      bs[k] = in_chan[2*k+1];
    end

  cplx_t it [N];
  cplx_t is [N];
  cplx_t st [N];
  cplx_t ss [N];
  logic  it_v, is_v, st_v, ss_v;

  fft #(.N(N), .INVERSE(1'b1)) u_ifft0 (.clk, .rst_n, .in_valid, .in_frame(bt), .out_valid(it_v), .out_frame(it));
  fft #(.N(N), .INVERSE(1'b1)) u_ifft1 (.clk, .rst_n, .in_valid, .in_frame(bs), .out_valid(is_v), .out_frame(is));

  logic                       cwe;
  logic [$clog2(N*TAPS)-1:0]  caddr;
  logic signed [17:0]         cdat;
  assign cwe   = cfg.we && cfg.addr[23:20] == REG_DECHAN;
  assign caddr = cfg.addr[$clog2(N*TAPS)-1:0];
  assign cdat  = cfg.data[17:0];

  pfb_fir #(.N(N), .TAPS(TAPS)) u_pfb0 (.clk, .rst_n, .in_valid(it_v), .in_frame(it),
    .wr_en(cwe), .wr_addr(caddr), .wr_data(cdat), .out_valid(st_v), .out_frame(st));
  pfb_fir #(.N(N), .TAPS(TAPS)) u_pfb1 (.clk, .rst_n, .in_valid(is_v), .in_frame(is),
    .wr_en(cwe), .wr_addr(caddr), .wr_data(cdat), .out_valid(ss_v), .out_frame(ss));

  // play the frames out (serializer)
  cplx_t                 qt [N];
  cplx_t                 qs [N];
  logic [$clog2(N):0]    pos;      // N: idle
  cplx_t                 s0, s1;
  logic                  s_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= ($clog2(N)+1)'(N);
      s_v <= 1'b0; s0 <= '0; s1 <= '0;
      for (int k = 0; k < N; k++) begin qt[k] <= '0; qs[k] <= '0; end
    end else begin
      s_v <= 1'b0;
      if (st_v & ss_v) begin
        qt <= st; qs <= ss; pos <= ($clog2(N)+1)'(1);
        s_v <= 1'b1; s0 <= st[0]; s1 <= ss[0];
      end else if (pos != ($clog2(N)+1)'(N)) begin
        s_v <= 1'b1;
        s0  <= qt[pos[$clog2(N)-1:0]];
        s1  <= qs[pos[$clog2(N)-1:0]];
        pos <= pos + 1'b1;
      end
    end
  end

  cplx_t s1_sh, s0_d;
  logic  sh_v;
  freq_shift #(.N(N), .SIGN(1)) u_shift (.clk, .rst_n, .in_valid(s_v), .in_data(s1),
    .out_valid(sh_v), .out_data(s1_sh));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s0_d <= '0;
    else        s0_d <= s0;

  function automatic logic signed [CONV_W-1:0] cut(input logic signed [DATA_W:0] v);
    logic signed [DATA_W:0] s;
    s = v >>> SH;
    if (s > (DATA_W+1)'((2**(CONV_W-1))-1))   return CONV_W'((2**(CONV_W-1))-1);
    else if (s < -(DATA_W+1)'(2**(CONV_W-1))) return CONV_W'(-(2**(CONV_W-1)));
    else                                      return CONV_W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0; dac_i <= '0; dac_q <= '0;
    end else begin
      dac_valid <= sh_v;
      dac_i     <= cut((DATA_W+1)'(s0_d.re) + (DATA_W+1)'(s1_sh.re));
      dac_q     <= cut((DATA_W+1)'(s0_d.im) + (DATA_W+1)'(s1_sh.im));
    end
  end
endmodule
