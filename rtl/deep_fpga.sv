// deep_fpga: signal-processing firmware for one 1-GHz RF block of a
// microwave SQUID multiplexer readout (digital electronics and event
// processor).
//
// Receive path: the I/Q ADC stream (baseband of one 1-GHz sub-band) is
// split by the coarse channelizer into 2N channels (two PFB channelizers,
// the second offset by half a bin).  The channel select hands N of them,
// N/4 each, to four demodulators, which mix each resonator tone to zero
// frequency, filter it, turn the resonator response into an angle and
// remove the flux-ramp modulation, giving one sensor sample per channel and
// ramp.  The four result streams are merged and the event processor
// triggers on x-ray pulses, identifies hydra pixels, decimates, and
// reports each pulse with its grade and optimal-filter (or integral)
// result.
// Transmit path: the demodulators also produce one probe tone per channel;
// the channel select collects them into a 2N-channel frame and the
// dechannelizer synthesizes the tone comb for the I/Q DACs.
//
// Interface: one complex ADC sample per clock (adc_valid), one complex DAC
// sample per clock (dac_valid), fr_sync from the flux-ramp generator at
// each ramp reset, a write-only configuration bus (lxm_pkg::cfg_t) for all
// coefficients, tables and thresholds, and the graded event stream.
//
// Defaults are those of the main array: N = 128, 4 demodulators of 32
// channels, hydra pixel identification, decimation by 4, HR/MR/LR records
// of 4096/1024/256 samples.  The original firmware runs the channelizers
// at 500 MHz with two samples per clock and the demodulators and event
// processor at 250 MHz; this version uses one clock and one sample per
// clock throughout (see the channelizer and channel-select headers).
module deep_fpga #(
  parameter int N        = lxm_pkg::N_FFT_MAIN,
  parameter int TAPS     = lxm_pkg::PFB_TAPS,
  parameter bit HYDRA    = 1'b1,
  parameter int NT       = 25,
  parameter int DECIM    = 4,
  parameter int DELAY    = 512,
  parameter int HR_LEN   = 4096,
  parameter int MR_LEN   = 1024,
  parameter int LR_LEN   = 256,
  parameter int HR_PRE   = 255,
  parameter int MR_PRE   = 63,
  parameter int LR_PRE   = 31,
  parameter int NS       = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  lxm_pkg::cfg_t                      cfg,
  input  logic                               fr_sync,
  input  logic                               adc_valid,
  input  logic signed [lxm_pkg::CONV_W-1:0]  adc_i,
  input  logic signed [lxm_pkg::CONV_W-1:0]  adc_q,
  output logic                               dac_valid,
  output logic signed [lxm_pkg::CONV_W-1:0]  dac_i,
  output logic signed [lxm_pkg::CONV_W-1:0]  dac_q,
  output logic                               ev_valid,
  output logic [$clog2(N)-1:0]               ev_chan,
  output logic [$clog2(NT)-1:0]              ev_tmpl,
  output lxm_pkg::grade_e                    ev_grade,
  output logic [31:0]                        ev_time,
  output logic signed [63:0]                 ev_val [3],
  output logic [31:0]                        ev_dropped,
  output logic [31:0]                        trig_count,
  output logic                               merge_overflow,
  // demodulated sensor samples (before merging), for monitoring
  output logic                               dm_valid [lxm_pkg::N_DEMOD],
  output logic [$clog2(N/lxm_pkg::N_DEMOD)-1:0] dm_chan [lxm_pkg::N_DEMOD],
  output logic signed [31:0]                 dm_phase [lxm_pkg::N_DEMOD]
);
  import lxm_pkg::*;
  localparam int ND  = N_DEMOD;
  localparam int CPD = N / ND;

  // ---------------- coarse channelizer ----------------
  logic  ch_v;
  cplx_t ch_d [2*N];
  coarse_channelizer #(.N(N), .TAPS(TAPS)) u_chan (
    .clk, .rst_n, .adc_valid, .adc_i, .adc_q, .cfg, .out_valid(ch_v), .out_chan(ch_d));

  // ---------------- channel select ----------------
  logic                 rx_v [ND];
  logic [$clog2(CPD)-1:0] rx_s [ND];
  cplx_t                rx_d [ND];
  logic                 tx_v [ND];
  logic [$clog2(CPD)-1:0] tx_s [ND];
  cplx_t                tx_d [ND];
  logic                 tf_v;
  cplx_t                tf_d [2*N];
  channel_select #(.N(N), .ND(ND)) u_sel (
    .clk, .rst_n, .cfg, .frame_valid(ch_v), .frame(ch_d),
    .rx_valid(rx_v), .rx_slot(rx_s), .rx_data(rx_d),
    .tx_valid(tx_v), .tx_slot(tx_s), .tx_data(tx_d),
    .frame_out_valid(tf_v), .frame_out(tf_d));

  // ---------------- demodulators ----------------
  for (genvar d = 0; d < ND; d++) begin : g_dm
    demodulator #(.NCH(CPD), .DEMOD_ID(4'(d))) u_dm (
      .clk, .rst_n, .cfg, .fr_sync,
      .in_valid(rx_v[d]), .in_chan(rx_s[d]), .in_data(rx_d[d]),
      .tone_valid(tx_v[d]), .tone_chan(tx_s[d]), .tone_data(tx_d[d]),
      .out_valid(dm_valid[d]), .out_chan(dm_chan[d]), .out_phase(dm_phase[d]));
  end

  // ---------------- tone synthesis ----------------
  dechannelizer #(.N(N), .TAPS(TAPS)) u_dechan (
    .clk, .rst_n, .cfg, .in_valid(tf_v), .in_chan(tf_d), .dac_valid, .dac_i, .dac_q);

  // ---------------- event processing ----------------
  logic                    mg_v;
  logic [$clog2(N)-1:0]    mg_ch;
  logic signed [31:0]      mg_d;
  event_merge #(.ND(ND), .CPD(CPD), .W(32), .DEPTH(CPD)) u_merge (
    .clk, .rst_n, .in_valid(dm_valid), .in_chan(dm_chan), .in_data(dm_phase),
    .out_valid(mg_v), .out_chan(mg_ch), .out_data(mg_d), .overflow(merge_overflow));

  event_processor #(.NCH(N), .W(32), .HYDRA(HYDRA), .NPIX(25), .NT(NT), .DECIM(DECIM),
                    .DELAY(DELAY), .HR_LEN(HR_LEN), .MR_LEN(MR_LEN), .LR_LEN(LR_LEN),
                    .HR_PRE(HR_PRE), .MR_PRE(MR_PRE), .LR_PRE(LR_PRE), .NS(NS)) u_ev (
    .clk, .rst_n, .cfg, .in_valid(mg_v), .in_chan(mg_ch), .in_data(mg_d),
    .ev_valid, .ev_chan, .ev_tmpl, .ev_grade, .ev_time, .ev_val, .ev_dropped, .trig_count);
endmodule
