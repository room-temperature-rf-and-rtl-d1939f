// tb_deep_fpga_full: the RF-block firmware at its default size (N = 128,
// 8-tap PFBs, four demodulators of 32 channels, hydra pixel map, CIC
// decimation by 4, 512-sample pretrigger delay, HR/MR/LR records of
// 4096/1024/256 samples) taken through one complete operation: a burst of
// three x-ray pulses is channelized, demodulated, triggered on, filtered
// and graded.
//
// Stimulus: one resonator tone at the band centre (thru bin 0), amplitude
// 4000, phase-modulated by the flux ramp as a*sin(2*pi*n/512 + s), one ramp
// = 512 ADC samples = 4 channel samples; s carries three pulses 400 ramps
// (100 decimated samples) apart.  All 128 demodulator slots are pointed at
// this channel, so every channel of the event processor sees the same
// pulses and all of its channel state is exercised.  The polyphase filters
// are loaded with a one-tap (rectangular) window, the demodulator FIRs
// with a single tap, and the flux-ramp demodulators integrate 4 samples at
// a quarter turn per sample.  The trigger threshold is raised while the
// pipeline settles.
//
// Expected, for every one of the 128 channels: three triggers; the middle
// pulse has both neighbours within the relaxed limit (961 decimated
// samples) and is graded LR, the outer two are graded MR; events of a
// channel are 100 decimated samples apart; nothing overflows or is
// dropped; the DAC carries the zero-frequency tone comb.
module tb_deep_fpga_full;
  import lxm_pkg::*;
  localparam int N = 128, ND = 4, CPD = 32;
  localparam int RAMP = 512, SPR = 4;
  localparam int P0 = 1200, PSTEP = 400, NRAMP = 8400, FRD = 320;
  localparam real TWO_PI = 6.283185307179586, A_MOD = 1.0, H = 2.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic fr_sync = 0, adc_valid = 0;
  logic signed [13:0] adc_i = 0, adc_q = 0, dac_i, dac_q;
  logic dac_valid, ev_valid, merge_overflow;
  logic [6:0] ev_chan;
  logic [4:0] ev_tmpl;
  grade_e ev_grade;
  logic [31:0] ev_time, ev_dropped, trig_count;
  logic signed [63:0] ev_val [3];
  logic dm_valid [ND];
  logic [4:0] dm_chan [ND];
  logic signed [31:0] dm_phase [ND];

  deep_fpga dut (
    .clk, .rst_n, .cfg, .fr_sync, .adc_valid, .adc_i, .adc_q, .dac_valid, .dac_i, .dac_q,
    .ev_valid, .ev_chan, .ev_tmpl, .ev_grade, .ev_time, .ev_val, .ev_dropped, .trig_count,
    .merge_overflow, .dm_valid, .dm_chan, .dm_phase);

  function automatic real sens(int r);
    real s = 0.0;
    for (int p = 0; p < 3; p++) begin
      int r0;
      r0 = P0 + p * PSTEP;
      if (r >= r0) begin
        if (r - r0 < 2) s += H * real'(r - r0 + 1) / 2.0;
        else s += H * $exp(-real'(r - r0 - 1) / 40.0);
      end
    end
    return s;
  endfunction

  int n_ev [N];
  int n_gr [3] = '{0, 0, 0};
  int last_t [N];
  int bad_dt = 0;
  always @(negedge clk) if (ev_valid) begin
    n_ev[ev_chan]++;
    n_gr[int'(ev_grade)]++;
  end
  // events of a channel may leave out of time order (LR finishes first),
  // so keep the earliest and latest time per channel
  int t_lo [N], t_hi [N];
  always @(negedge clk) if (ev_valid) begin
    if (int'(ev_time) < t_lo[ev_chan]) t_lo[ev_chan] = int'(ev_time);
    if (int'(ev_time) > t_hi[ev_chan]) t_hi[ev_chan] = int'(ev_time);
  end
  int n_dac = 0;
  real dac_max = 0.0;
  always @(negedge clk) if (dac_valid) begin
    real m;
    m = $sqrt(real'(dac_i) * real'(dac_i) + real'(dac_q) * real'(dac_q));
    n_dac++;
    if (m > dac_max) dac_max = m;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wcfg(input logic [3:0] reg_, input logic [19:0] a, input logic [31:0] dat);
    @(negedge clk); cfg.we = 1; cfg.addr = {reg_, a}; cfg.data = dat;
  endtask

  initial begin
    for (int c = 0; c < N; c++) begin n_ev[c] = 0; t_lo[c] = 32'h7FFF_FFFF; t_hi[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8*N; a++) begin
      wcfg(REG_CHAN, 20'(a), (a < N) ? 32'd65536 : 32'd0);
      wcfg(REG_DECHAN, 20'(a), (a < N) ? 32'd65536 : 32'd0);
    end
    for (int d = 0; d < ND; d++)
      for (int j = 0; j < CPD; j++) wcfg(REG_SEL, 20'(d*CPD + j), 32'h1_0000);
    for (int d = 0; d < ND; d++) begin
      for (int k = 0; k < 16; k++) wcfg(4'(REG_DEMOD0 + d), {4'd4, 16'(k)}, (k == 0) ? 32'd65536 : 32'd0);
      for (int j = 0; j < CPD; j++) wcfg(4'(REG_DEMOD0 + d), {4'd8, 16'(j)}, 32'd16384);
      wcfg(4'(REG_DEMOD0 + d), {4'd10, 16'd0}, 32'(SPR));
    end
    wcfg(REG_EVENT, 20'h0, 32'h3FFF_FFFF);
    @(negedge clk); cfg = '0;

    for (int n = 0; n < NRAMP*RAMP; n++) begin
      real ph;
      ph = A_MOD * $sin(TWO_PI * real'(n % RAMP) / real'(RAMP) + sens(n / RAMP));
      @(negedge clk);
      adc_valid = 1;
      adc_i = 14'($rtoi(4000.0 * $cos(ph)));
      adc_q = 14'($rtoi(4000.0 * $sin(ph)));
      fr_sync = (n % RAMP == FRD);
      cfg = '0;
      if (n == 100*RAMP) begin cfg.we = 1; cfg.addr = {REG_EVENT, 20'h0}; cfg.data = 32'd2000; end
    end
    @(negedge clk); adc_valid = 0; fr_sync = 0;
    repeat (2000) @(negedge clk);

    checks++;
    if (trig_count != 3 * N) begin failures++; $display("FAIL trig_count %0d want %0d", trig_count, 3 * N); end
    for (int c = 0; c < N; c++) begin
      checks += 2;
      if (n_ev[c] != 3) begin failures++; $display("FAIL channel %0d events %0d", c, n_ev[c]); end
      if (t_hi[c] - t_lo[c] < 2 * PSTEP / 4 - 2 || t_hi[c] - t_lo[c] > 2 * PSTEP / 4 + 2) begin
        failures++; $display("FAIL channel %0d event span %0d", c, t_hi[c] - t_lo[c]);
      end
    end
    checks += 3;
    if (n_gr[0] != 0) begin failures++; $display("FAIL HR events %0d", n_gr[0]); end
    if (n_gr[1] != 2 * N) begin failures++; $display("FAIL MR events %0d", n_gr[1]); end
    if (n_gr[2] != N) begin failures++; $display("FAIL LR events %0d", n_gr[2]); end
    checks += 3;
    if (merge_overflow) begin failures++; $display("FAIL merge overflow"); end
    if (ev_dropped != 0) begin failures++; $display("FAIL dropped %0d", ev_dropped); end
    if (n_dac < NRAMP * RAMP - 2000 || dac_max < 100.0) begin failures++; $display("FAIL dac samples %0d max %f", n_dac, dac_max); end
    $display("triggers=%0d MR=%0d LR=%0d dac_samples=%0d dac_max=%f", trig_count, n_gr[1], n_gr[2], n_dac, dac_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
