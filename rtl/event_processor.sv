// event_processor: finds x-ray pulses in the demodulated sensor streams
// and measures their energy.
//
// Chain (per time-multiplexed channel):
//   trigger        slope trigger (derivative + edge trigger)
//   hydra_demux    rise time -> hydra pixel (HYDRA = 1 only)
//   cic_decim      CIC decimation by DECIM (4 for hydra arrays, else 1)
//   pretrig_delay  circular-buffer delay of DELAY decimated samples, long
//                  enough that an event is registered before its record
//                  starts to come out
//   optimal_filter speculative HR / MR optimal filters and LR integrator,
//                  grading, result selection
// The template index of an event is its hydra pixel (HYDRA = 1: NT = 25
// templates shared by all TESs) or its channel (HYDRA = 0: one template
// per TES, NT = NCH).
//
// Configuration, cfg region lxm_pkg::REG_EVENT: address 0 trigger
// threshold, 1 trigger direction (0 up, 1 down), 2..5 strict dt_p,
// strict dt_n, relaxed dt_p, relaxed dt_n (decimated samples), 0x100+i
// hydra rise-time boundary i.  Region lxm_pkg::REG_TMPL: templates, address
// bit 19 selects the MR (quarter-length) memory, bits [18:0] the entry.
// Output: one graded event per clock at most.
//
// Block order and functions follow the design; the register map and the
// default thresholds (strict = HR record after its pretrigger, relaxed =
// MR record after its pretrigger) are this implementation's choices.
module event_processor #(
  parameter int NCH      = lxm_pkg::N_FFT_MAIN,
  parameter int W        = 32,
  parameter bit HYDRA    = 1'b1,
  parameter int NPIX     = 25,
  parameter int NT       = 25,
  parameter int RISE_MAX = 64,
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
  input  logic                          clk,
  input  logic                          rst_n,
  input  lxm_pkg::cfg_t                 cfg,
  input  logic                          in_valid,
  input  logic [$clog2(NCH)-1:0]        in_chan,
  input  logic signed [W-1:0]           in_data,
  output logic                          ev_valid,
  output logic [$clog2(NCH)-1:0]        ev_chan,
  output logic [$clog2(NT)-1:0]         ev_tmpl,
  output lxm_pkg::grade_e               ev_grade,
  output logic [31:0]                   ev_time,
  output logic signed [63:0]            ev_val [3],
  output logic [31:0]                   ev_dropped,
  output logic [31:0]                   trig_count
);
  import lxm_pkg::*;
  localparam int CW = $clog2(NCH);

  // ---------------- registers ----------------
  logic signed [W-1:0] thr;
  logic                dir;
  logic [31:0]         sp, sn, rp, rn;
  logic [15:0]         bound [NPIX-1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr <= W'(1000); dir <= 1'b0;
      sp <= 32'(HR_LEN - HR_PRE); sn <= 32'(HR_LEN - HR_PRE);
      rp <= 32'(MR_LEN - MR_PRE); rn <= 32'(MR_LEN - MR_PRE);
      for (int i = 0; i < NPIX-1; i++) bound[i] <= 16'(2*(i+1));
    end else if (cfg.we && cfg.addr[23:20] == REG_EVENT) begin
      if (cfg.addr[8]) bound[cfg.addr[$clog2(NPIX)-1:0]] <= cfg.data[15:0];
      else case (cfg.addr[2:0])
        3'd0: thr <= W'(cfg.data);
        3'd1: dir <= cfg.data[0];
        3'd2: sp  <= cfg.data;
        3'd3: sn  <= cfg.data;
        3'd4: rp  <= cfg.data;
        3'd5: rn  <= cfg.data;
        default: ;
      endcase
    end
  end

  // ---------------- trigger ----------------
  logic t_v, t_tr;
  logic [CW-1:0] t_ch;
  logic signed [W-1:0] t_d, t_dv;
  trigger #(.NCH(NCH), .W(W)) u_trig (.clk, .rst_n, .thr, .dir,
    .in_valid, .in_chan, .in_data,
    .out_valid(t_v), .out_chan(t_ch), .out_data(t_d), .out_deriv(t_dv), .out_trig(t_tr));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_count <= '0;
    else if (t_v && t_tr) trig_count <= trig_count + 1'b1;

  // ---------------- hydra pixel ----------------
  logic h_v, e_v;
  logic [CW-1:0] h_ch, e_ch;
  logic signed [W-1:0] h_d;
  logic [$clog2(NPIX)-1:0] e_pix;
  logic [31:0] e_t;
  hydra_demux #(.NCH(NCH), .W(W), .NPIX(NPIX), .RISE_MAX(RISE_MAX), .HYDRA(HYDRA)) u_hyd (
    .clk, .rst_n, .bound,
    .in_valid(t_v), .in_chan(t_ch), .in_data(t_d), .in_deriv(t_dv), .in_trig(t_tr),
    .out_valid(h_v), .out_chan(h_ch), .out_data(h_d),
    .evt_valid(e_v), .evt_chan(e_ch), .evt_pix(e_pix), .evt_time(e_t));

  // ---------------- decimation ----------------
  logic c_v;
  logic [CW-1:0] c_ch;
  logic signed [W-1:0] c_d;
  cic_decim #(.NCH(NCH), .W(W), .R(DECIM)) u_cic (.clk, .rst_n,
    .in_valid(h_v), .in_chan(h_ch), .in_data(h_d),
    .out_valid(c_v), .out_chan(c_ch), .out_data(c_d));

  // ---------------- pretrigger delay ----------------
  logic p_v;
  logic [CW-1:0] p_ch;
  logic signed [W-1:0] p_d;
  logic [31:0] p_t;
  pretrig_delay #(.NCH(NCH), .W(W), .DEPTH(DELAY)) u_dly (.clk, .rst_n,
    .in_valid(c_v), .in_chan(c_ch), .in_data(c_d),
    .out_valid(p_v), .out_chan(p_ch), .out_data(p_d), .out_time(p_t));

  // ---------------- optimal filters and grading ----------------
  logic [$clog2(NT)-1:0] e_tm;
  assign e_tm = HYDRA ? ($clog2(NT))'(e_pix) : ($clog2(NT))'(e_ch);

  optimal_filter #(.NCH(NCH), .W(W), .NT(NT), .HR_LEN(HR_LEN), .MR_LEN(MR_LEN), .LR_LEN(LR_LEN),
                   .HR_PRE(HR_PRE), .MR_PRE(MR_PRE), .LR_PRE(LR_PRE), .NS(NS)) u_of (
    .clk, .rst_n,
    .strict_p(sp), .strict_n(sn), .relax_p(rp), .relax_n(rn),
    .tmpl_wr_en(cfg.we && cfg.addr[23:20] == REG_TMPL), .tmpl_wr_mr(cfg.addr[19]),
    .tmpl_wr_addr(cfg.addr[$clog2(NT*HR_LEN)-1:0]), .tmpl_wr_data(cfg.data[15:0]),
    .evt_valid(e_v), .evt_chan(e_ch), .evt_tmpl(e_tm), .evt_time(e_t / 32'(DECIM)),
    .in_valid(p_v), .in_chan(p_ch), .in_data(p_d), .in_time(p_t),
    .out_valid(ev_valid), .out_chan(ev_chan), .out_tmpl(ev_tmpl), .out_grade(ev_grade),
    .out_time(ev_time), .out_val(ev_val), .dropped(ev_dropped));
endmodule
