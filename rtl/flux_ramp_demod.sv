// flux_ramp_demod: flux-ramp demodulation of time-multiplexed channels.
//
// The flux ramp sweeps each SQUID through several flux quanta per ramp, so
// the resonator phase of a channel is a periodic signal whose phase offset
// carries the sensor signal.  For every channel this block
//   1. mixes the incoming phase samples with cos/sin of the ramp's
//      modulation frequency from a DDS that restarts at each ramp reset,
//   2. masks the first mask_len samples after the reset (reset transient),
//   3. integrates the next int_len mixed samples (the host sets int_len to
//      an integer number of modulation periods),
//   4. takes atan2 of the integrated I/Q pair with a vectoring CORDIC, and
//   5. unwraps the result against the channel's previous value.
// One output per channel and ramp: out_phase is the unwrapped signal in
// phase units (2**16 per flux quantum).  fr_sync marks a ramp reset: every
// channel's next sample is taken as the first sample of a new ramp.
//
// Interface: in_valid/in_chan/in_phase one sample per clock at most; DDS
// frequency/offset via dds_wr_*.  Latency from the last integrated sample:
// 2*ITERS + 5 clocks.
//
// Steps 1-5 follow the design; the counters, widths and the pending-reset
// bookkeeping are this implementation's.
module flux_ramp_demod #(
  parameter int NCH = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           fr_sync,
  input  logic                           in_valid,
  input  logic [$clog2(NCH)-1:0]         in_chan,
  input  logic [lxm_pkg::PHASE_W-1:0]    in_phase,
  input  logic [15:0]                    mask_len,
  input  logic [15:0]                    int_len,
  input  logic                           dds_wr_en,
  input  logic                           dds_wr_sel,
  input  logic [$clog2(NCH)-1:0]         dds_wr_chan,
  input  logic [lxm_pkg::PHASE_W-1:0]    dds_wr_data,
  output logic                           out_valid,
  output logic [$clog2(NCH)-1:0]         out_chan,
  output logic signed [31:0]             out_phase
);
  import lxm_pkg::*;
  localparam int CHW = $clog2(NCH);
  localparam int TGW = PHASE_W + CHW + 1;
  localparam int AW  = 48;

  logic [NCH-1:0] pend;
  logic [15:0]    cnt  [NCH];
  logic signed [AW-1:0] acc_i [NCH];
  logic signed [AW-1:0] acc_q [NCH];
  logic [PHASE_W-1:0]   prev [NCH];
  logic signed [31:0]   unw  [NCH];

  // ---- DDS for the mixing sinusoids; the sample rides along as tag ----
  logic                     m_v;
  logic signed [17:0]       m_cos, m_sin;
  logic [TGW-1:0]           m_tag;
  logic                     restart;
  assign restart = pend[in_chan];

  dds #(.NCH(NCH), .OUT_W(18), .AMP(65536), .TAG_W(TGW)) u_dds (
    .clk, .rst_n, .in_valid, .in_chan, .restart,
    .tag_in({restart, in_chan, in_phase}),
    .wr_en(dds_wr_en), .wr_sel(dds_wr_sel), .wr_chan(dds_wr_chan), .wr_data(dds_wr_data),
    .out_valid(m_v), .cos_out(m_cos), .sin_out(m_sin), .tag_out(m_tag));

  logic                   t_rst;
  logic [CHW-1:0]         t_ch;
  logic signed [PHASE_W-1:0] t_ph;
  assign {t_rst, t_ch, t_ph} = m_tag;

  logic [15:0]          n_eff;
  logic signed [AW-1:0] p_i, p_q;
  always_comb begin
    n_eff = t_rst ? 16'd0 : cnt[t_ch];
    p_i   = AW'(t_ph) * AW'(m_cos);
    p_q   = -(AW'(t_ph) * AW'(m_sin));
  end

  logic                 c_v;
  logic signed [AW-1:0] c_i, c_q;
  logic [CHW-1:0]       c_ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      for (int c = 0; c < NCH; c++) begin
        cnt[c] <= 16'hFFFF; acc_i[c] <= '0; acc_q[c] <= '0;
      end
      c_v <= 1'b0; c_i <= '0; c_q <= '0; c_ch <= '0;
    end else begin
      if (in_valid) pend[in_chan] <= 1'b0;
      if (fr_sync)  pend <= '1;
      c_v <= 1'b0;
      if (m_v) begin
        if (n_eff != 16'hFFFF) cnt[t_ch] <= n_eff + 1'b1;
        if (n_eff == mask_len) begin
          acc_i[t_ch] <= p_i;
          acc_q[t_ch] <= p_q;
        end else if (n_eff > mask_len && n_eff < mask_len + int_len) begin
          acc_i[t_ch] <= acc_i[t_ch] + p_i;
          acc_q[t_ch] <= acc_q[t_ch] + p_q;
        end
        if (int_len != 16'd0 && n_eff == mask_len + int_len - 1'b1) begin
          c_v  <= 1'b1;
          c_ch <= t_ch;
          c_i  <= (int_len == 16'd1) ? p_i : acc_i[t_ch] + p_i;
          c_q  <= (int_len == 16'd1) ? p_q : acc_q[t_ch] + p_q;
        end
      end
    end
  end

  // ---- arctangent of the integrated pair ----
  logic                  a_v;
  logic [PHASE_W-1:0]    a_ph;
  logic [CHW-1:0]        a_ch;
  logic signed [AW+1:0]  a_x, a_y;
  cordic #(.W(AW+2), .IN_W(AW), .VECTORING(1'b1), .TAG_W(CHW)) u_atan (
    .clk, .rst_n, .in_valid(c_v), .x_in(c_i), .y_in(c_q), .z_in('0), .tag_in(c_ch),
    .out_valid(a_v), .x_out(a_x), .y_out(a_y), .z_out(a_ph), .tag_out(a_ch));

  // ---- phase unwrap ----
  logic signed [PHASE_W-1:0] dlt;
  assign dlt = $signed(a_ph - prev[a_ch]);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin prev[c] <= '0; unw[c] <= '0; end
      out_valid <= 1'b0; out_chan <= '0; out_phase <= '0;
    end else begin
      out_valid <= a_v;
      if (a_v) begin
        prev[a_ch] <= a_ph;
        unw[a_ch]  <= unw[a_ch] + 32'(dlt);
        out_chan   <= a_ch;
        out_phase  <= unw[a_ch] + 32'(dlt);
      end
    end
  end
endmodule
