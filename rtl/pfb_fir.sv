// pfb_fir: polyphase FIR filter of a PFB channelizer, frame in, frame out.
//
// A frame is N consecutive complex samples (N = FFT size).  The block keeps
// the last TAPS frames; on every in_valid it shifts the new frame in and
// forms, for each of the N branches k,
//     out[k] = sum_{t=0}^{TAPS-1} h[t*N + k] * frame_t[k]   (frame_0 newest)
// rounded back by COEF_FRAC bits and saturated to DATA_W.  The same
// structure is the analysis filter ahead of the FFT (coarse channelizer)
// and the synthesis filter after the IFFT (tone-generating dechannelizer).
// The N*TAPS prototype coefficients are written through the wr_* port and
// are not reset; they must be loaded before use.  Latency: one clock.
//
// The 8-tap polyphase FIR and its use on both sides follow the design; the
// frame-parallel organisation (one whole frame per in_valid instead of the
// two-sample-per-clock datapath of the original firmware), the coefficient
// format (Q1.COEF_FRAC) and the write port are this implementation's.
module pfb_fir #(
  parameter int N         = lxm_pkg::N_FFT_MAIN,
  parameter int TAPS      = lxm_pkg::PFB_TAPS,
  parameter int DATA_W    = lxm_pkg::DATA_W,
  parameter int COEF_W    = 18,
  parameter int COEF_FRAC = 17
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  lxm_pkg::cplx_t                 in_frame  [N],
  input  logic                           wr_en,
  input  logic [$clog2(N*TAPS)-1:0]      wr_addr,
  input  logic signed [COEF_W-1:0]       wr_data,
  output logic                           out_valid,
  output lxm_pkg::cplx_t                 out_frame [N]
);
  import lxm_pkg::*;
  localparam int AW = DATA_W + COEF_W + $clog2(TAPS) + 1;

  logic signed [COEF_W-1:0] h [N*TAPS];
  cplx_t                    hist [TAPS][N];

  always_ff @(posedge clk) begin
    if (wr_en) h[wr_addr] <= wr_data;
  end

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] s;
    s = v >>> COEF_FRAC;
    if (s > AW'((2**(DATA_W-1))-1))       return DATA_W'((2**(DATA_W-1))-1);
    else if (s < -AW'(2**(DATA_W-1)))     return DATA_W'(-(2**(DATA_W-1)));
    else                                  return DATA_W'(s);
  endfunction

  // combinational branch sums over the shifted-in history
  cplx_t nxt [N];
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [AW-1:0] ar, ai;
      ar = AW'(h[k]) * AW'(in_frame[k].re);
      ai = AW'(h[k]) * AW'(in_frame[k].im);
      for (int t = 1; t < TAPS; t++) begin
        ar += AW'(h[t*N+k]) * AW'(hist[t-1][k].re);
        ai += AW'(h[t*N+k]) * AW'(hist[t-1][k].im);
      end
      nxt[k].re = sat(ar);
      nxt[k].im = sat(ai);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int t = 0; t < TAPS; t++)
        for (int k = 0; k < N; k++) hist[t][k] <= '0;
      for (int k = 0; k < N; k++) out_frame[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[0] <= in_frame;
        for (int t = 1; t < TAPS; t++) hist[t] <= hist[t-1];
        out_frame <= nxt;
      end
    end
  end
endmodule
