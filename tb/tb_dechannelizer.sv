// tb_dechannelizer: N = 8 tone synthesizer with a one-tap prototype
// (h = 0.5 on the newest frame).  Repeated frames carrying one tone of
// amplitude 16000 on channel 2*k0 (thru bin) or 2*k0+1 (half-bin shifted
// bin) must give a continuous DAC tone of amplitude 16000*0.5/16 = 500 at
// k0/N or (k0+1/2)/N cycles per sample: every sample is checked for its
// magnitude and for the phase step from the previous sample.  Also checks
// one DAC sample per clock while frames arrive every N clocks.
module tb_dechannelizer;
  import lxm_pkg::*;
  localparam int N = 8;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic in_valid = 0, dac_valid;
  cplx_t fr [2*N];
  logic signed [13:0] dac_i, dac_q;
  dechannelizer #(.N(N)) dut (.clk, .rst_n, .cfg, .in_valid, .in_chan(fr), .dac_valid, .dac_i, .dac_q);

  real w;              // expected phase step
  bit  chk_on = 0;
  real pr, pq;
  int  nv = 0;
  always @(negedge clk) if (chk_on && dac_valid) begin
    real er, eq, m;
    m = $sqrt(real'(dac_i)*real'(dac_i) + real'(dac_q)*real'(dac_q));
    checks++;
    if (m < 494.0 || m > 506.0) begin failures++; $display("FAIL magnitude %f", m); end
    if (nv > 0) begin
      er = pr * $cos(w) - pq * $sin(w);
      eq = pr * $sin(w) + pq * $cos(w);
      checks++;
      if ((real'(dac_i) - er) > 6.0 || (real'(dac_i) - er) < -6.0 || (real'(dac_q) - eq) > 6.0 || (real'(dac_q) - eq) < -6.0) begin
        failures++; $display("FAIL step got %0d,%0d want %f,%f", dac_i, dac_q, er, eq);
      end
    end
    pr = real'(dac_i); pq = real'(dac_q);
    nv++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ch, input real bin);
    int cnt = 0;
    for (int c = 0; c < 2*N; c++) fr[c] = '0;
    fr[ch].re = 18'sd16000;
    w = TWO_PI * bin / N;
    for (int f = 0; f < 14; f++) begin
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      if (f == 10) begin chk_on = 1; nv = 0; end    // after the 8-frame history has filled
      for (int k = 0; k < N-2; k++) begin
        @(negedge clk);
        if (dac_valid) cnt++;
      end
    end
    chk_on = 0;
    checks++;
    if (cnt < 14*(N-2) - N) begin failures++; $display("FAIL dac rate %0d", cnt); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8*N; a++) begin
      @(negedge clk);
      cfg.we = 1; cfg.addr = {REG_DECHAN, 20'(a)}; cfg.data = (a < N) ? 32'd65536 : 32'd0;
    end
    @(negedge clk); cfg.we = 0;
    run(2*3, 3.0);
    run(2*1+1, 1.5);
    run(2*6+1, 6.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
