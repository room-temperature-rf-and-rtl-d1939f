// fft: N-point radix-2 decimation-in-time FFT on a whole frame.
//
// The input frame is taken in bit-reversed order and passes through
// log2(N) butterfly stages, one register stage each; a new frame may enter
// on every clock.  Latency: log2(N) + 1 clocks.  Twiddles
// W^k = exp(-+j*2*pi*k/N) are built at elaboration by an integer CORDIC
// (lxm_pkg::cos_sin), with TW_FRAC fractional bits.
//   INVERSE = 0: forward transform scaled by 1/N, so a full-scale complex
//                tone on bin k returns its own amplitude in bin k.
//   INVERSE = 1: inverse transform without scaling (bins of amplitude A
//                give tones of amplitude A); results saturate to DATA_W.
// The internal width grows one bit per stage, so no stage overflows.
//
// The FFT size (128/32/256 for the three arrays) follows the design; the
// frame-parallel pipeline and its scaling are this implementation's choice.
module fft #(
  parameter int N       = lxm_pkg::N_FFT_MAIN,
  parameter bit INVERSE = 1'b0,
  parameter int DATA_W  = lxm_pkg::DATA_W,
  parameter int TW_FRAC = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  lxm_pkg::cplx_t in_frame  [N],
  output logic           out_valid,
  output lxm_pkg::cplx_t out_frame [N]
);
  import lxm_pkg::*;
  localparam int LOGN = $clog2(N);
  localparam int IW   = DATA_W + LOGN + 1;
  localparam int TW   = TW_FRAC + 2;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } wide_t;

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if (v[b]) r |= 1 << (LOGN-1-b);
    return r;
  endfunction

  // twiddle table, N/2 entries
  logic signed [TW-1:0] tw_re [N/2];
  logic signed [TW-1:0] tw_im [N/2];
  for (genvar k = 0; k < N/2; k++) begin : g_tw
    localparam logic [PHASE_W-1:0] PH = PHASE_W'((k * (2**PHASE_W)) / N);
    localparam logic [63:0] CS = cos_sin(INVERSE ? PH : PHASE_W'(-PH), 2**TW_FRAC);
    assign tw_re[k] = TW'($signed(CS[63:32]));
    assign tw_im[k] = TW'($signed(CS[31:0]));
  end

  wide_t st [LOGN+1][N];
  logic  sv [LOGN+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv[0] <= 1'b0;
      for (int k = 0; k < N; k++) st[0][k] <= '0;
    end else begin
      sv[0] <= in_valid;
      if (in_valid)
        for (int k = 0; k < N; k++) begin
          st[0][k].re <= IW'(in_frame[bitrev(k)].re);
          st[0][k].im <= IW'(in_frame[bitrev(k)].im);
        end
    end
  end

  for (genvar s = 0; s < LOGN; s++) begin : g_st
    localparam int HALF = 1 << s;
    localparam int STEP = N / (2*HALF);
    wide_t nxt [N];
    always_comb begin
      for (int g = 0; g < N; g += 2*HALF) begin
        for (int j = 0; j < HALF; j++) begin
          logic signed [IW+TW-1:0] pr, pi;
          wide_t a, b;
          a = st[s][g+j];
          b = st[s][g+j+HALF];
          pr = ((IW+TW)'(b.re) * (IW+TW)'(tw_re[j*STEP]) - (IW+TW)'(b.im) * (IW+TW)'(tw_im[j*STEP])) >>> TW_FRAC;
          pi = ((IW+TW)'(b.re) * (IW+TW)'(tw_im[j*STEP]) + (IW+TW)'(b.im) * (IW+TW)'(tw_re[j*STEP])) >>> TW_FRAC;
          nxt[g+j].re      = a.re + IW'(pr);
          nxt[g+j].im      = a.im + IW'(pi);
          nxt[g+j+HALF].re = a.re - IW'(pr);
          nxt[g+j+HALF].im = a.im - IW'(pi);
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sv[s+1] <= 1'b0;
        for (int k = 0; k < N; k++) st[s+1][k] <= '0;
      end else begin
        sv[s+1] <= sv[s];
        if (sv[s]) st[s+1] <= nxt;
      end
    end
  end

  function automatic logic signed [DATA_W-1:0] outsat(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] s;
    s = INVERSE ? v : (v >>> LOGN);
    if (s > IW'((2**(DATA_W-1))-1))   return DATA_W'((2**(DATA_W-1))-1);
    else if (s < -IW'(2**(DATA_W-1))) return DATA_W'(-(2**(DATA_W-1)));
    else                              return DATA_W'(s);
  endfunction

  assign out_valid = sv[LOGN];
  always_comb
    for (int k = 0; k < N; k++) begin
      out_frame[k].re = outsat(st[LOGN][k].re);
      out_frame[k].im = outsat(st[LOGN][k].im);
    end
endmodule
