// tb_deep_fpga: end-to-end test of the RF-block firmware at N = 8
// (16 coarse channels, four demodulators of two channels, records of
// 16/8/4 decimated samples, decimation by 2).
//
// Stimulus: eight resonator tones, one at the centre of every thru bin,
// amplitude 1000 each.  Each tone's phase is modulated by the flux ramp,
// a*sin(2*pi*n/128 + s_b), one ramp = 128 ADC samples = 16 channel
// samples, and s_b carries x-ray pulses (linear rise of 2 or 6 ramps,
// exponential fall) on bins 2, 5 and 6; the other bins stay quiet.
// fr_sync is issued once per ramp, delayed by roughly the receive
// pipeline latency.  The channel select routes bin d*2+j to slot j of
// demodulator d; all demodulator tone generators run at zero frequency.
//
// Mechanisms counted and checked:
//   - receive chain (channelizer, select, mixer, FIR, arc angle, flux-ramp
//     demodulation): every channel yields one sample per ramp; quiet
//     channels stay flat; the first pulse step seen on bin 2 matches the
//     injected phase step,
//   - trigger: exactly one trigger per pulse, none on quiet channels,
//   - hydra pixel from rise time (bounds 3 and 8 samples),
//   - grading: HR, MR and LR events with the expected spacing in time,
//   - transmit chain (select, dechannelizer): the eight equal zero-phase
//     tones add up to one DAC impulse every 8 samples of magnitude ~2048,
//   - no merge overflow and no dropped events.
module tb_deep_fpga;
  import lxm_pkg::*;
  localparam int N = 8, ND = 4, CPD = 2;
  localparam int RAMP = 128, NRAMP = 270, FRD = 68;
  localparam real TWO_PI = 6.283185307179586, A_MOD = 1.0, H = 2.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic fr_sync = 0, adc_valid = 0;
  logic signed [13:0] adc_i = 0, adc_q = 0, dac_i, dac_q;
  logic dac_valid, ev_valid, merge_overflow;
  logic [2:0] ev_chan;
  logic [4:0] ev_tmpl;
  grade_e ev_grade;
  logic [31:0] ev_time, ev_dropped, trig_count;
  logic signed [63:0] ev_val [3];
  logic dm_valid [ND];
  logic [0:0] dm_chan [ND];
  logic signed [31:0] dm_phase [ND];

  deep_fpga #(.N(N), .HYDRA(1'b1), .DECIM(2), .DELAY(16), .HR_LEN(16), .MR_LEN(8), .LR_LEN(4),
              .HR_PRE(3), .MR_PRE(1), .LR_PRE(1), .NS(4)) dut (
    .clk, .rst_n, .cfg, .fr_sync, .adc_valid, .adc_i, .adc_q, .dac_valid, .dac_i, .dac_q,
    .ev_valid, .ev_chan, .ev_tmpl, .ev_grade, .ev_time, .ev_val, .ev_dropped, .trig_count,
    .merge_overflow, .dm_valid, .dm_chan, .dm_phase);

  // pulses: bin, start ramp, rise (ramps), expected pixel and grade
  localparam int NP = 7;
  int     p_bin [NP] = '{2, 2, 2, 2, 2, 5, 6};
  int     p_r0  [NP] = '{60, 120, 180, 190, 200, 90, 150};
  int     p_rise[NP] = '{2, 6, 2, 2, 2, 6, 2};
  int     p_pix [NP] = '{0, 1, 0, 0, 0, 1, 0};
  grade_e p_g   [NP] = '{GRADE_HR, GRADE_HR, GRADE_MR, GRADE_LR, GRADE_MR, GRADE_HR, GRADE_HR};

  function automatic real sens(int b, int r);
    real s = 0.0;
    for (int p = 0; p < NP; p++)
      if (p_bin[p] == b && r >= p_r0[p]) begin
        if (r - p_r0[p] < p_rise[p]) s += H * real'(r - p_r0[p] + 1) / real'(p_rise[p]);
        else s += H * $exp(-real'(r - p_r0[p] - p_rise[p] + 1) / 6.0);
      end
    return s;
  endfunction

  // receive-side monitors
  int nsamp [N];
  longint dmv [N][$];
  always @(negedge clk)
    for (int d = 0; d < ND; d++)
      if (dm_valid[d]) begin
        nsamp[d*CPD + int'(dm_chan[d])]++;
        dmv[d*CPD + int'(dm_chan[d])].push_back(longint'(dm_phase[d]));
      end

  // events
  int     e_n [N];
  int     e_t [N][$];
  grade_e e_g [N][$];
  int     e_pix [N][$];
  always @(negedge clk) if (ev_valid) begin
    e_n[ev_chan]++;
    e_t[ev_chan].push_back(int'(ev_time));
    e_g[ev_chan].push_back(ev_grade);
    e_pix[ev_chan].push_back(int'(ev_tmpl));
  end

  // transmit-side monitor
  real dmag [$];
  always @(negedge clk) if (dac_valid)
    dmag.push_back($sqrt(real'(dac_i) * real'(dac_i) + real'(dac_q) * real'(dac_q)));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wcfg(input logic [3:0] reg_, input logic [19:0] a, input logic [31:0] dat);
    @(negedge clk); cfg.we = 1; cfg.addr = {reg_, a}; cfg.data = dat;
    @(negedge clk); cfg.we = 0;
  endtask

  int ncnt [3] = '{0, 0, 0};
  int npix_ok = 0;

  initial begin
    for (int b = 0; b < N; b++) begin nsamp[b] = 0; e_n[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one-tap (rectangular) polyphase filters
    for (int a = 0; a < 8*N; a++) begin
      wcfg(REG_CHAN, 20'(a), (a < N) ? 32'd65536 : 32'd0);
      wcfg(REG_DECHAN, 20'(a), (a < N) ? 32'd65536 : 32'd0);
    end
    // bin d*2+j (channel 2*(d*2+j)) to demodulator d slot j, enabled
    for (int d = 0; d < ND; d++)
      for (int j = 0; j < CPD; j++)
        wcfg(REG_SEL, 20'(d*CPD + j), 32'(2*(d*CPD + j)) | 32'h1_0000);
    for (int d = 0; d < ND; d++) begin
      for (int k = 0; k < 16; k++) wcfg(4'(REG_DEMOD0 + d), {4'd4, 16'(k)}, (k == 0) ? 32'd65536 : 32'd0);
      for (int j = 0; j < CPD; j++) wcfg(4'(REG_DEMOD0 + d), {4'd8, 16'(j)}, 32'd4096);
      wcfg(4'(REG_DEMOD0 + d), {4'd10, 16'd0}, 32'd16);
    end
    // trigger held off until the pipeline has settled; hydra bounds 3, 8
    wcfg(REG_EVENT, 20'h0, 32'h3FFF_FFFF);
    wcfg(REG_EVENT, 20'h100, 32'd3);
    wcfg(REG_EVENT, 20'h101, 32'd8);
    for (int i = 2; i < 24; i++) wcfg(REG_EVENT, 20'h100 + 20'(i), 32'd1000);

    for (int n = 0; n < NRAMP*RAMP; n++) begin
      real si, sq, ph;
      int r;
      r = n / RAMP;
      si = 0.0; sq = 0.0;
      for (int b = 0; b < N; b++) begin
        ph = TWO_PI * real'(b * (n % N)) / real'(N) + A_MOD * $sin(TWO_PI * real'(n % RAMP) / real'(RAMP) + sens(b, r));
        si += 1000.0 * $cos(ph);
        sq += 1000.0 * $sin(ph);
      end
      @(negedge clk);
      adc_valid = 1;
      adc_i = 14'($rtoi(si));
      adc_q = 14'($rtoi(sq));
      fr_sync = (n % RAMP == FRD);
      cfg = '0;
      if (n == 40*RAMP) begin cfg.we = 1; cfg.addr = {REG_EVENT, 20'h0}; cfg.data = 32'd2000; end
    end
    @(negedge clk); adc_valid = 0; fr_sync = 0; cfg = '0;
    repeat (200) @(negedge clk);

    // ---- receive chain ----
    for (int b = 0; b < N; b++) begin
      checks++;
      if (nsamp[b] < NRAMP - 3 || nsamp[b] > NRAMP + 1) begin failures++; $display("FAIL bin %0d %0d samples", b, nsamp[b]); end
    end
    for (int b = 0; b < N; b++)
      if (b != 2 && b != 5 && b != 6) begin
        longint lo, hi;
        lo = dmv[b][30]; hi = dmv[b][30];
        for (int i = 30; i < dmv[b].size(); i++) begin
          if (dmv[b][i] < lo) lo = dmv[b][i];
          if (dmv[b][i] > hi) hi = dmv[b][i];
        end
        checks++;
        if (hi - lo > 1500) begin failures++; $display("FAIL quiet bin %0d spread %0d", b, hi - lo); end
      end
    begin
      // largest one-ramp step on bin 2 before ramp 100: the first pulse
      // rises by H/2 per ramp
      longint best = 0, want;
      for (int i = 31; i < 100 && i < dmv[2].size(); i++)
        if (dmv[2][i] - dmv[2][i-1] > best) best = dmv[2][i] - dmv[2][i-1];
      want = longint'(H / 2.0 / TWO_PI * 65536.0);
      checks++;
      $display("bin 2 first pulse step %0d (injected %0d)", best, want);
      if (best < want * 8 / 10 || best > want * 12 / 10) begin failures++; $display("FAIL pulse step"); end
    end

    // ---- trigger, hydra pixel, grading ----
    checks++;
    if (trig_count != NP) begin failures++; $display("FAIL trig_count %0d want %0d", trig_count, NP); end
    for (int b = 0; b < N; b++) begin
      int idx [$];
      idx.delete();
      for (int p = 0; p < NP; p++) if (p_bin[p] == b) idx.push_back(p);
      checks++;
      if (e_n[b] != idx.size()) begin failures++; $display("FAIL bin %0d events %0d want %0d", b, e_n[b], idx.size()); end
      else begin
        // events of one channel leave in grading order, so sort by time
        for (int i = 0; i < e_n[b]; i++)
          for (int k = i + 1; k < e_n[b]; k++)
            if (e_t[b][k] < e_t[b][i]) begin
              int t; grade_e g; int px;
              t = e_t[b][i]; e_t[b][i] = e_t[b][k]; e_t[b][k] = t;
              g = e_g[b][i]; e_g[b][i] = e_g[b][k]; e_g[b][k] = g;
              px = e_pix[b][i]; e_pix[b][i] = e_pix[b][k]; e_pix[b][k] = px;
            end
        for (int i = 0; i < e_n[b]; i++) begin
          int p;
          p = idx[i];
          checks += 2;
          ncnt[int'(e_g[b][i])]++;
          if (e_g[b][i] != p_g[p]) begin failures++; $display("FAIL pulse %0d grade %0d want %0d", p, e_g[b][i], p_g[p]); end
          if (e_pix[b][i] != p_pix[p]) begin failures++; $display("FAIL pulse %0d pixel %0d want %0d", p, e_pix[b][i], p_pix[p]); end
          else npix_ok++;
          if (i > 0) begin
            int dt, want;
            dt = e_t[b][i] - e_t[b][i-1];
            want = (p_r0[p] - p_r0[idx[i-1]]) / 2;
            checks++;
            if (dt < want - 1 || dt > want + 1) begin failures++; $display("FAIL pulse %0d spacing %0d want %0d", p, dt, want); end
          end
        end
      end
    end
    checks++;
    if (ncnt[0] == 0 || ncnt[1] == 0 || ncnt[2] == 0) begin failures++; $display("FAIL not every grade seen"); end

    // ---- transmit chain ----
    begin
      int ph = 0;
      real best = 0.0;
      int base;
      base = dmag.size() - 64;
      for (int i = 0; i < 8; i++) if (dmag[base + i] > best) begin best = dmag[base + i]; ph = i; end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (i % 8 == ph) begin
          if (dmag[base + i] < 1700.0 || dmag[base + i] > 2400.0) begin failures++; $display("FAIL dac impulse %f", dmag[base + i]); end
        end else if (dmag[base + i] > 150.0) begin failures++; $display("FAIL dac between impulses %f", dmag[base + i]); end
      end
      $display("dac impulse magnitude %f, samples %0d", best, dmag.size());
    end

    checks += 2;
    if (merge_overflow) begin failures++; $display("FAIL merge overflow"); end
    if (ev_dropped != 0) begin failures++; $display("FAIL dropped %0d", ev_dropped); end
    $display("mechanisms: samples/bin=%0d triggers=%0d pixel_ok=%0d HR=%0d MR=%0d LR=%0d dac_samples=%0d",
             nsamp[0], trig_count, npix_ok, ncnt[0], ncnt[1], ncnt[2], dmag.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
