// tb_optimal_filter: two channels of random samples with scheduled
// triggers spaced so that HR, MR and LR grades all occur (HR/MR/LR record
// lengths 64/16/4, pretriggers 3/1/1, strict thresholds 61, relaxed 15,
// three templates of random values).  A reference computed here from the
// whole sample history gives, for every event, its grade from dt_p/dt_n
// and its result: the three lagged template dot products (HR, MR) or the
// offset-subtracted integral (LR).  Every reported event must match, every
// scheduled event must be reported once, and none may be dropped.
module tb_optimal_filter;
  import lxm_pkg::*;
  localparam int NCH = 2, NT = 3, HL = 64, ML = 16, LL = 4, HP = 3, MP = 1, LP = 1, NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tmpl_wr_en = 0, tmpl_wr_mr = 0, evt_valid = 0, in_valid = 0, out_valid;
  logic [7:0] tmpl_wr_addr = 0;
  logic signed [15:0] tmpl_wr_data = 0;
  logic [0:0] evt_chan = 0, in_chan = 0, out_chan;
  logic [1:0] evt_tmpl = 0, out_tmpl;
  logic [31:0] evt_time = 0, in_time = 0, out_time, dropped;
  logic signed [31:0] in_data = 0;
  grade_e out_grade;
  logic signed [63:0] out_val [3];
  optimal_filter #(.NCH(NCH), .W(32), .NT(NT), .HR_LEN(HL), .MR_LEN(ML), .LR_LEN(LL),
                   .HR_PRE(HP), .MR_PRE(MP), .LR_PRE(LP), .NS(NS)) dut (.clk, .rst_n,
    .strict_p(32'd61), .strict_n(32'd61), .relax_p(32'd15), .relax_n(32'd15),
    .tmpl_wr_en, .tmpl_wr_mr, .tmpl_wr_addr, .tmpl_wr_data,
    .evt_valid, .evt_chan, .evt_tmpl, .evt_time, .in_valid, .in_chan, .in_data, .in_time,
    .out_valid, .out_chan, .out_tmpl, .out_grade, .out_time, .out_val, .dropped);

  localparam int T = 520;
  longint x [NCH][T];
  longint th [NT][HL];
  longint tm [NT][ML];
  int trig [NCH][6] = '{'{10, 110, 140, 240, 248, 254}, '{20, 140, 340, 350, 355, 450}};
  int tsel [NCH][6] = '{'{0, 1, 2, 0, 1, 2}, '{2, 1, 0, 2, 1, 0}};
  bit got [NCH][6];
  int ngr [3] = '{0, 0, 0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    int c, i;
    c = int'(out_chan);
    i = -1;
    for (int e = 0; e < 6; e++) if (trig[c][e] == int'(out_time)) i = e;
    checks++;
    if (i < 0 || got[c][i]) begin failures++; $display("FAIL unexpected event ch %0d t %0d", c, out_time); end
    else begin
      longint dtp, dtn, v [3];
      grade_e g;
      int tt, ts;
      got[c][i] = 1;
      tt = trig[c][i];
      dtp = (i == 0) ? 64'hFFFF_FFFF : tt - trig[c][i-1];
      dtn = (i == 5) ? 1000 : trig[c][i+1] - tt;
      if (dtp >= 61 && dtn >= 61) g = GRADE_HR;
      else if (dtp < 15 && dtn < 15) g = GRADE_LR;
      else g = GRADE_MR;
      for (int l = 0; l < 3; l++) v[l] = 0;
      if (g == GRADE_HR) begin
        ts = tt - HP;
        for (int l = 0; l < 3; l++) for (int k = 0; k < HL; k++) v[l] += th[tsel[c][i]][k] * x[c][ts + k + l - 1];
      end else if (g == GRADE_MR) begin
        ts = tt - MP;
        for (int l = 0; l < 3; l++) for (int k = 0; k < ML; k++) v[l] += tm[tsel[c][i]][k] * x[c][ts + k + l - 1];
      end else begin
        ts = tt - LP;
        for (int k = 0; k < LL; k++) v[1] += x[c][ts + k] - x[c][ts];
      end
      ngr[int'(g)]++;
      if (out_grade != g || out_tmpl != 2'(tsel[c][i]) || out_val[0] != v[0] || out_val[1] != v[1] || out_val[2] != v[2]) begin
        failures++;
        $display("FAIL ch %0d t %0d grade %0d/%0d val %0d/%0d", c, tt, out_grade, g, out_val[1], v[1]);
      end
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) for (int t = 0; t < T; t++) x[c][t] = longint'($urandom_range(0, 200000)) - 100000;
    for (int n = 0; n < NT; n++) begin
      for (int k = 0; k < HL; k++) th[n][k] = longint'($urandom_range(0, 2000)) - 1000;
      for (int k = 0; k < ML; k++) tm[n][k] = longint'($urandom_range(0, 2000)) - 1000;
    end
    for (int c = 0; c < NCH; c++) for (int e = 0; e < 6; e++) got[c][e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NT; n++) begin
      for (int k = 0; k < HL; k++) begin
        @(negedge clk); tmpl_wr_en = 1; tmpl_wr_mr = 0; tmpl_wr_addr = 8'(n*HL + k); tmpl_wr_data = 16'(th[n][k]);
      end
      for (int k = 0; k < ML; k++) begin
        @(negedge clk); tmpl_wr_en = 1; tmpl_wr_mr = 1; tmpl_wr_addr = 8'(n*ML + k); tmpl_wr_data = 16'(tm[n][k]);
      end
    end
    @(negedge clk); tmpl_wr_en = 0;
    for (int t = 0; t < T; t++)
      for (int c = 0; c < NCH; c++) begin
        for (int e = 0; e < 6; e++)
          if (trig[c][e] - HP - 3 == t) begin
            @(negedge clk);
            evt_valid = 1; evt_chan = 1'(c); evt_tmpl = 2'(tsel[c][e]); evt_time = 32'(trig[c][e]);
            @(negedge clk);
            evt_valid = 0;
          end
        @(negedge clk);
        in_valid = 1; in_chan = 1'(c); in_data = 32'(x[c][t]); in_time = 32'(t);
        @(negedge clk);
        in_valid = 0;
      end
    repeat (5) @(negedge clk);
    for (int c = 0; c < NCH; c++) for (int e = 0; e < 6; e++) begin
      checks++;
      if (!got[c][e]) begin failures++; $display("FAIL missing event ch %0d t %0d", c, trig[c][e]); end
    end
    checks += 2;
    if (dropped != 0) begin failures++; $display("FAIL dropped %0d", dropped); end
    if (ngr[0] == 0 || ngr[1] == 0 || ngr[2] == 0) begin failures++; $display("FAIL grades %0d %0d %0d", ngr[0], ngr[1], ngr[2]); end
    $display("grades HR=%0d MR=%0d LR=%0d", ngr[0], ngr[1], ngr[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
