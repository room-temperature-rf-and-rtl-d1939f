// optimal_filter: speculative HR/MR optimal filtering, LR integration and
// event grading, time-multiplexed over NCH channels.
//
// Events (channel, template index, trigger time) arrive from the trigger /
// hydra stage before their records start to leave the pretrigger delay.
// Each event takes one of NS slots of its channel and, as the channel's
// delayed samples x(t) pass, all three results are built at once:
//   HR: record of HR_LEN samples from t_trig - HR_PRE, full-length template
//   MR: record of MR_LEN samples from t_trig - MR_PRE, quarter template
//       each as three dot products sum_k T[k]*x(t_s+k+l), l = -1, 0, +1
//       (record delayed, aligned, advanced by one sample)
//   LR: sum_k (x(t_s+k) - x(t_s)) over LR_LEN samples from t_trig - LR_PRE,
//       i.e. the integral after removing the offset at the record start.
// Grading uses dt_p (time from the channel's previous trigger) and dt_n
// (time to its next trigger):
//   HR if dt_p >= strict_p and dt_n >= strict_n
//   LR if dt_p <  relax_p  and dt_n <  relax_n
//   MR otherwise.
// dt_n is known when the next trigger arrives; without one, the grade is
// settled as soon as the elapsed time, a lower bound of dt_n, leaves only
// one outcome (at once when dt_p already rules out both HR and LR, after
// relax_n when dt_p rules out HR only, after strict_n otherwise).  As soon
// as the grade is known and its
// record is complete, the event is reported with the matching result
// (val[0..2] = lags -1/0/+1 for HR and MR, val[1] = integral for LR) and
// the slot is freed; the other results are discarded.  Because every
// event gets its own slot there is no dead time up to NS overlapping
// events per channel; an event finding all slots busy is counted in
// dropped.  At most one event is reported per clock; another ready slot
// of the same channel reports on the channel's next sample.
// Templates: cfg-style write port; tmpl_wr_mr selects the MR memory,
// address = template*LEN + k, signed 16-bit values.  Output one clock
// after the sample that completes the record.
//
// Records, lengths, pretriggers, three lags, grading rule and speculative
// execution follow the design.  Slot count, widths, the LR offset (first
// record sample) and the dt_n timeout are this implementation's choices.
module optimal_filter #(
  parameter int NCH     = 128,
  parameter int W       = 32,
  parameter int NT      = 25,          // templates (25 hydra pixels, or one per TES)
  parameter int HR_LEN  = 4096,
  parameter int MR_LEN  = 1024,
  parameter int LR_LEN  = 256,
  parameter int HR_PRE  = 255,
  parameter int MR_PRE  = 63,
  parameter int LR_PRE  = 31,
  parameter int NS      = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [31:0]                   strict_p,
  input  logic [31:0]                   strict_n,
  input  logic [31:0]                   relax_p,
  input  logic [31:0]                   relax_n,
  input  logic                          tmpl_wr_en,
  input  logic                          tmpl_wr_mr,
  input  logic [$clog2(NT*HR_LEN)-1:0]  tmpl_wr_addr,
  input  logic signed [15:0]            tmpl_wr_data,
  input  logic                          evt_valid,
  input  logic [$clog2(NCH)-1:0]        evt_chan,
  input  logic [$clog2(NT)-1:0]         evt_tmpl,
  input  logic [31:0]                   evt_time,
  input  logic                          in_valid,
  input  logic [$clog2(NCH)-1:0]        in_chan,
  input  logic signed [W-1:0]           in_data,
  input  logic [31:0]                   in_time,
  output logic                          out_valid,
  output logic [$clog2(NCH)-1:0]        out_chan,
  output logic [$clog2(NT)-1:0]         out_tmpl,
  output lxm_pkg::grade_e               out_grade,
  output logic [31:0]                   out_time,
  output logic signed [63:0]            out_val [3],
  output logic [31:0]                   dropped
);
  import lxm_pkg::*;
  localparam int CW = $clog2(NCH);
  localparam int SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int TW = $clog2(NT);

  // ---------------- template memories ----------------
  logic signed [15:0] t_hr [NT*HR_LEN];
  logic signed [15:0] t_mr [NT*MR_LEN];
  always_ff @(posedge clk) begin
    if (tmpl_wr_en) begin
      if (tmpl_wr_mr) t_mr[tmpl_wr_addr[$clog2(NT*MR_LEN)-1:0]] <= tmpl_wr_data;
      else            t_hr[tmpl_wr_addr] <= tmpl_wr_data;
    end
  end

  // ---------------- slot state ----------------
  logic              s_act  [NCH][NS];
  logic [31:0]       s_tt   [NCH][NS];
  logic [TW-1:0]     s_tm   [NCH][NS];
  logic [31:0]       s_dtp  [NCH][NS];
  logic [31:0]       s_dtn  [NCH][NS];
  logic              s_dtnk [NCH][NS];
  logic signed [63:0] a_hr  [NCH][NS][3];
  logic signed [63:0] a_mr  [NCH][NS][3];
  logic signed [63:0] a_lr  [NCH][NS];
  logic signed [W-1:0] s_x0 [NCH][NS];
  logic [31:0]       last_t [NCH];
  logic              last_ok[NCH];
  logic [SW-1:0]     last_s [NCH];
  logic              last_sv[NCH];   // last event holds a slot
  logic signed [W-1:0] h1 [NCH];     // x(t-1)
  logic signed [W-1:0] h2 [NCH];     // x(t-2)

  // ---------------- sample processing (combinational) ----------------
  logic signed [W-1:0] xd, xc, xa;
  logic [31:0]         tc;
  assign xa = in_data;
  assign xc = h1[in_chan];
  assign xd = h2[in_chan];
  assign tc = in_time - 32'd1;

  logic signed [63:0] n_hr [NS][3];
  logic signed [63:0] n_mr [NS][3];
  logic signed [63:0] n_lr [NS];
  logic signed [W-1:0] n_x0 [NS];
  logic               fin  [NS];
  grade_e             gr   [NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic [31:0] kh, km, kl, el, dtn;
      logic        known, h_done, m_done, l_done;
      logic signed [15:0] th, tm;
      kh = tc - (s_tt[in_chan][s] - 32'(HR_PRE));
      km = tc - (s_tt[in_chan][s] - 32'(MR_PRE));
      kl = tc - (s_tt[in_chan][s] - 32'(LR_PRE));
      th = t_hr[s_tm[in_chan][s] * HR_LEN + int'(kh[$clog2(HR_LEN)-1:0])];
      tm = t_mr[s_tm[in_chan][s] * MR_LEN + int'(km[$clog2(MR_LEN)-1:0])];
      n_hr[s] = a_hr[in_chan][s];
      n_mr[s] = a_mr[in_chan][s];
      n_lr[s] = a_lr[in_chan][s];
      n_x0[s] = s_x0[in_chan][s];
      if ($signed(kh) >= 0 && kh < 32'(HR_LEN)) begin
        n_hr[s][0] = a_hr[in_chan][s][0] + 64'(th) * 64'(xd);
        n_hr[s][1] = a_hr[in_chan][s][1] + 64'(th) * 64'(xc);
        n_hr[s][2] = a_hr[in_chan][s][2] + 64'(th) * 64'(xa);
      end
      if ($signed(km) >= 0 && km < 32'(MR_LEN)) begin
        n_mr[s][0] = a_mr[in_chan][s][0] + 64'(tm) * 64'(xd);
        n_mr[s][1] = a_mr[in_chan][s][1] + 64'(tm) * 64'(xc);
        n_mr[s][2] = a_mr[in_chan][s][2] + 64'(tm) * 64'(xa);
      end
      if (kl == 32'd0) begin
        n_x0[s] = xc;
        n_lr[s] = '0;
      end else if ($signed(kl) > 0 && kl < 32'(LR_LEN)) begin
        n_lr[s] = a_lr[in_chan][s] + 64'(xc) - 64'(s_x0[in_chan][s]);
      end
      // grading
      el     = tc - s_tt[in_chan][s];
      // settled once dt_n is known, or once no later trigger could change
      // the grade (dt_n is at least the time elapsed so far)
      known  = s_dtnk[in_chan][s] ||
               ($signed(el) >= 0 && el >= strict_n && el >= relax_n) ||
               (s_dtp[in_chan][s] < strict_p &&
                (s_dtp[in_chan][s] >= relax_p || ($signed(el) >= 0 && el >= relax_n)));
      dtn    = s_dtnk[in_chan][s] ? s_dtn[in_chan][s] : el;
      if (s_dtp[in_chan][s] >= strict_p && dtn >= strict_n)   gr[s] = GRADE_HR;
      else if (s_dtp[in_chan][s] < relax_p && dtn < relax_n)  gr[s] = GRADE_LR;
      else                                                    gr[s] = GRADE_MR;
      h_done = $signed(kh) >= 0 && kh >= 32'(HR_LEN-1);
      m_done = $signed(km) >= 0 && km >= 32'(MR_LEN-1);
      l_done = $signed(kl) >= 0 && kl >= 32'(LR_LEN-1);
      fin[s] = s_act[in_chan][s] && known &&
               (gr[s] == GRADE_HR ? h_done : gr[s] == GRADE_MR ? m_done : l_done);
    end
  end

  logic          any_fin;
  logic [SW-1:0] fs;
  always_comb begin
    any_fin = 1'b0;
    fs      = '0;
    for (int s = NS-1; s >= 0; s--)
      if (fin[s]) begin any_fin = 1'b1; fs = SW'(s); end
  end

  // ---------------- event registration (combinational) ----------------
  logic          free_ok;
  logic [SW-1:0] free_s;
  always_comb begin
    free_ok = 1'b0;
    free_s  = '0;
    for (int s = NS-1; s >= 0; s--)
      if (!s_act[evt_chan][s]) begin free_ok = 1'b1; free_s = SW'(s); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        last_t[c] <= '0; last_ok[c] <= 1'b0; last_s[c] <= '0; last_sv[c] <= 1'b0; h1[c] <= '0; h2[c] <= '0;
        for (int s = 0; s < NS; s++) begin
          s_act[c][s] <= 1'b0; s_tt[c][s] <= '0; s_tm[c][s] <= '0; s_dtp[c][s] <= '0;
          s_dtn[c][s] <= '0; s_dtnk[c][s] <= 1'b0; a_lr[c][s] <= '0; s_x0[c][s] <= '0;
          for (int l = 0; l < 3; l++) begin a_hr[c][s][l] <= '0; a_mr[c][s][l] <= '0; end
        end
      end
      out_valid <= 1'b0; out_chan <= '0; out_tmpl <= '0; out_grade <= GRADE_HR;
      out_time <= '0; dropped <= '0;
      for (int l = 0; l < 3; l++) out_val[l] <= '0;
    end else begin
      out_valid <= 1'b0;
      // -------- samples --------
      if (in_valid) begin
        h1[in_chan] <= xa;
        h2[in_chan] <= xc;
        for (int s = 0; s < NS; s++)
          if (s_act[in_chan][s]) begin
            a_hr[in_chan][s] <= n_hr[s];
            a_mr[in_chan][s] <= n_mr[s];
            a_lr[in_chan][s] <= n_lr[s];
            s_x0[in_chan][s] <= n_x0[s];
          end
        if (any_fin) begin
          s_act[in_chan][fs] <= 1'b0;
          out_valid <= 1'b1;
          out_chan  <= in_chan;
          out_tmpl  <= s_tm[in_chan][fs];
          out_grade <= gr[fs];
          out_time  <= s_tt[in_chan][fs];
          case (gr[fs])
            GRADE_HR: out_val <= n_hr[fs];
            GRADE_MR: out_val <= n_mr[fs];
            default: begin out_val[0] <= '0; out_val[1] <= n_lr[fs]; out_val[2] <= '0; end
          endcase
        end
      end
      // -------- new events (written after, distinct fields or free slot) --------
      if (evt_valid) begin
        if (last_sv[evt_chan] && s_act[evt_chan][last_s[evt_chan]] && !s_dtnk[evt_chan][last_s[evt_chan]]) begin
          s_dtn[evt_chan][last_s[evt_chan]]  <= evt_time - last_t[evt_chan];
          s_dtnk[evt_chan][last_s[evt_chan]] <= 1'b1;
        end
        last_t[evt_chan]  <= evt_time;
        last_ok[evt_chan] <= 1'b1;
        if (free_ok && !(in_valid && any_fin && in_chan == evt_chan && fs == free_s)) begin
          s_act[evt_chan][free_s]  <= 1'b1;
          s_tt[evt_chan][free_s]   <= evt_time;
          s_tm[evt_chan][free_s]   <= evt_tmpl;
          s_dtp[evt_chan][free_s]  <= last_ok[evt_chan] ? evt_time - last_t[evt_chan] : 32'hFFFF_FFFF;
          s_dtnk[evt_chan][free_s] <= 1'b0;
          a_lr[evt_chan][free_s]   <= '0;
          for (int l = 0; l < 3; l++) begin
            a_hr[evt_chan][free_s][l] <= '0;
            a_mr[evt_chan][free_s][l] <= '0;
          end
          last_s[evt_chan]  <= free_s;
          last_sv[evt_chan] <= 1'b1;
        end else begin
          dropped <= dropped + 1'b1;
          last_sv[evt_chan] <= 1'b0;
        end
      end
    end
  end
endmodule
