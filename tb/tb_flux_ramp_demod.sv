// tb_flux_ramp_demod: two channels carry a flux-ramp-modulated phase
// theta[n] = A*cos(2*pi*n/8 + phi) + offset (n counted from the ramp reset,
// 8 samples per modulation period).  With mask 3 and integration over 16
// samples (two periods) the demodulated value of each ramp must equal phi
// (2**16 per turn).  phi advances 0.3 turn per ramp, so the unwrapper must
// accumulate past +-half a turn: expected output is the first phi (as a
// signed turn) plus 0.3 turn per ramp.  Checks one output per channel and
// ramp and that masked and post-integration samples are ignored (they are
// corrupted here).
module tb_flux_ramp_demod;
  import lxm_pkg::*;
  localparam int NCH = 2, M = 3, L = 16;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fr_sync = 0, in_valid = 0, dds_wr_en = 0, dds_wr_sel = 0;
  logic [0:0] in_chan = 0, dds_wr_chan = 0, out_chan;
  logic [15:0] in_phase = 0, dds_wr_data = 0;
  logic out_valid;
  logic signed [31:0] out_phase;
  flux_ramp_demod #(.NCH(NCH)) dut (.clk, .rst_n, .fr_sync, .in_valid, .in_chan, .in_phase,
    .mask_len(16'(M)), .int_len(16'(L)), .dds_wr_en, .dds_wr_sel, .dds_wr_chan, .dds_wr_data,
    .out_valid, .out_chan, .out_phase);

  real phi0 [NCH] = '{0.1, 0.7};
  int  nout [NCH];
  int  ramp;

  always @(negedge clk) if (out_valid) begin
    real want;
    int c;
    c = int'(out_chan);
    want = (phi0[c] > 0.5 ? phi0[c] - 1.0 : phi0[c]) * 65536.0 + real'(nout[c]) * 0.3 * 65536.0;
    checks++;
    if (real'(out_phase) - want > 40.0 || real'(out_phase) - want < -40.0) begin
      failures++; $display("FAIL ch %0d ramp %0d got %0d want %f", c, nout[c], out_phase, want);
    end
    nout[c]++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nout = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk); dds_wr_en = 1; dds_wr_sel = 0; dds_wr_chan = 1'(c); dds_wr_data = 16'd8192;
    end
    @(negedge clk); dds_wr_en = 0;
    for (ramp = 0; ramp < 8; ramp++) begin
      @(negedge clk); fr_sync = 1;
      @(negedge clk); fr_sync = 0;
      for (int n = 0; n < M + L + 3; n++)
        for (int c = 0; c < NCH; c++) begin
          real phi, th;
          phi = phi0[c] + 0.3 * ramp;
          th  = 8000.0 * $cos(TWO_PI * (real'(n) / 8.0 + phi)) + 1000.0;
          if (n < M || n >= M + L) th = 20000.0;      // must be ignored
          in_valid = 1; in_chan = 1'(c); in_phase = 16'($rtoi(th));
          @(negedge clk);
          in_valid = 0;
        end
      repeat (45) @(negedge clk);
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (nout[c] != 8) begin failures++; $display("FAIL ch %0d outputs %0d", c, nout[c]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
