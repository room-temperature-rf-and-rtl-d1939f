// tb_event_processor: two channels carry a sequence of x-ray-like pulses
// (linear rise of 2..12 samples, exponential fall) at spacings chosen to
// give every grade, with a hydra rise-time map of three boundaries
// (3, 6, 9 samples -> pixels 0..3), decimation by 2 and small records
// (HR/MR/LR 32/8/4 decimated samples).  All templates are flat.  Checks:
// one trigger per pulse, exactly one event per pulse with the right
// channel, time (trigger sample / 2, within one), hydra pixel and grade,
// twice the filter output for a pulse of twice the amplitude, and no
// dropped events.
module tb_event_processor;
  import lxm_pkg::*;
  localparam int NCH = 2, NPIX = 4, NT = 4, HL = 32, ML = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic in_valid = 0, ev_valid;
  logic [0:0] in_chan = 0, ev_chan;
  logic signed [31:0] in_data = 0;
  logic [1:0] ev_tmpl;
  grade_e ev_grade;
  logic [31:0] ev_time, ev_dropped, trig_count;
  logic signed [63:0] ev_val [3];
  event_processor #(.NCH(NCH), .W(32), .HYDRA(1'b1), .NPIX(NPIX), .NT(NT), .RISE_MAX(16),
    .DECIM(2), .DELAY(32), .HR_LEN(HL), .MR_LEN(ML), .LR_LEN(4), .HR_PRE(3), .MR_PRE(1),
    .LR_PRE(1), .NS(3)) dut (.clk, .rst_n, .cfg, .in_valid, .in_chan, .in_data,
    .ev_valid, .ev_chan, .ev_tmpl, .ev_grade, .ev_time, .ev_val, .ev_dropped, .trig_count);

  localparam int NP = 11, T = 1700;
  int     p_ch [NP] = '{0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1};
  int     p_t  [NP] = '{100, 400, 700, 730, 1000, 1010, 1020, 1300, 150, 500, 900};
  int     p_r  [NP] = '{5, 5, 2, 8, 2, 2, 2, 12, 8, 12, 2};
  real    p_a  [NP] = '{40000.0, 80000.0, 30000.0, 30000.0, 30000.0, 30000.0, 30000.0, 40000.0, 50000.0, 50000.0, 50000.0};
  int     p_pix[NP] = '{1, 1, 0, 2, 0, 0, 0, 3, 2, 3, 0};
  grade_e p_g  [NP] = '{GRADE_HR, GRADE_HR, GRADE_MR, GRADE_MR, GRADE_MR, GRADE_LR, GRADE_MR,
                        GRADE_HR, GRADE_HR, GRADE_HR, GRADE_HR};
  int     got  [NP];
  longint val1 [NP];

  function automatic real sig(int c, int t);
    real s = 0.0;
    for (int p = 0; p < NP; p++)
      if (p_ch[p] == c && t >= p_t[p]) begin
        if (t - p_t[p] < p_r[p]) s += p_a[p] * real'(t - p_t[p] + 1) / real'(p_r[p]);
        else s += p_a[p] * $exp(-real'(t - p_t[p] - p_r[p] + 1) / 20.0);
      end
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (ev_valid) begin
    int m = -1;
    for (int p = 0; p < NP; p++)
      if (p_ch[p] == int'(ev_chan) && int'(ev_time) >= p_t[p] / 2 - 1 && int'(ev_time) <= p_t[p] / 2 + 1) m = p;
    checks++;
    if (m < 0) begin failures++; $display("FAIL unexpected event ch %0d t %0d", ev_chan, ev_time); end
    else begin
      got[m]++;
      val1[m] = ev_val[1];
      checks += 2;
      if (int'(ev_tmpl) != p_pix[m]) begin failures++; $display("FAIL pulse %0d pixel %0d want %0d", m, ev_tmpl, p_pix[m]); end
      if (ev_grade != p_g[m]) begin failures++; $display("FAIL pulse %0d grade %0d want %0d", m, ev_grade, p_g[m]); end
    end
  end

  task automatic wcfg(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk); cfg.we = 1; cfg.addr = a; cfg.data = d;
    @(negedge clk); cfg.we = 0;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin got[p] = 0; val1[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wcfg({4'(REG_EVENT), 20'h00100}, 32'd3);
    wcfg({4'(REG_EVENT), 20'h00101}, 32'd6);
    wcfg({4'(REG_EVENT), 20'h00102}, 32'd9);
    for (int n = 0; n < NT; n++) begin
      for (int k = 0; k < HL; k++) wcfg({4'(REG_TMPL), 1'b0, 19'(n*HL + k)}, 32'd1000);
      for (int k = 0; k < ML; k++) wcfg({4'(REG_TMPL), 1'b1, 19'(n*ML + k)}, 32'd1000);
    end
    for (int t = 0; t < T; t++)
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        in_valid = 1; in_chan = 1'(c); in_data = 32'($rtoi(sig(c, t)));
      end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (trig_count != NP) begin failures++; $display("FAIL trig_count %0d", trig_count); end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (got[p] != 1) begin failures++; $display("FAIL pulse %0d reported %0d times", p, got[p]); end
    end
    checks++;
    if (val1[0] <= 0 || val1[1] < 2 * val1[0] - val1[0] / 50 || val1[1] > 2 * val1[0] + val1[0] / 50) begin
      failures++; $display("FAIL linearity %0d %0d", val1[0], val1[1]);
    end
    checks++;
    if (ev_dropped != 0) begin failures++; $display("FAIL dropped %0d", ev_dropped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
