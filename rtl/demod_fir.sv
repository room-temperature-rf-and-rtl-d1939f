// demod_fir: 16-tap low-pass FIR on time-multiplexed complex channels.
//
// After the fine-tuning mixer each channel sits at zero frequency; this
// filter rejects the spurious tones outside the resonator bandwidth.  Every
// in_valid sample belongs to channel in_chan; the channel's last TAPS-1
// samples are kept in a per-channel delay line and
//     y = sum_t h[t] * x[n-t]   >>> 17     (h in Q1.17, real, shared)
// is produced one clock later with the channel number.  The coefficients
// reset to a 16-point moving average (h = 1/16) and can be rewritten through
// the wr_* port.
//
// The 16 taps follow the design; the coefficient set, its format and the
// per-channel delay-line organisation are this implementation's.
module demod_fir #(
  parameter int NCH    = 32,
  parameter int TAPS   = lxm_pkg::DEMOD_TAPS,
  parameter int DATA_W = lxm_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(NCH)-1:0]   in_chan,
  input  lxm_pkg::cplx_t           in_data,
  input  logic                     wr_en,
  input  logic [$clog2(TAPS)-1:0]  wr_addr,
  input  logic signed [17:0]       wr_data,
  output logic                     out_valid,
  output logic [$clog2(NCH)-1:0]   out_chan,
  output lxm_pkg::cplx_t           out_data
);
  import lxm_pkg::*;
  localparam int AW = DATA_W + 18 + $clog2(TAPS) + 1;

  logic signed [17:0] h   [TAPS];
  cplx_t              dly [NCH][TAPS-1];

  logic signed [AW-1:0] ar, ai;
  always_comb begin
    ar = AW'(h[0]) * AW'(in_data.re);
    ai = AW'(h[0]) * AW'(in_data.im);
    for (int t = 1; t < TAPS; t++) begin
      ar += AW'(h[t]) * AW'(dly[in_chan][t-1].re);
      ai += AW'(h[t]) * AW'(dly[in_chan][t-1].im);
    end
  end

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] s;
    s = v >>> 17;
    if (s > AW'((2**(DATA_W-1))-1))   return DATA_W'((2**(DATA_W-1))-1);
    else if (s < -AW'(2**(DATA_W-1))) return DATA_W'(-(2**(DATA_W-1)));
    else                              return DATA_W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) h[t] <= 18'sd8192;     // 1/16
      for (int c = 0; c < NCH; c++)
        for (int t = 0; t < TAPS-1; t++) dly[c][t] <= '0;
      out_valid <= 1'b0; out_chan <= '0; out_data <= '0;
    end else begin
      if (wr_en) h[wr_addr] <= wr_data;
      out_valid <= in_valid;
      if (in_valid) begin
        dly[in_chan][0] <= in_data;
        for (int t = 1; t < TAPS-1; t++) dly[in_chan][t] <= dly[in_chan][t-1];
        out_chan    <= in_chan;
        out_data.re <= sat(ar);
        out_data.im <= sat(ai);
      end
    end
  end
endmodule
