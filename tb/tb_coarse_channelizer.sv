// tb_coarse_channelizer: N = 8 channelizer with a one-tap prototype
// (h = 0.5 on the newest frame, 0 elsewhere) so that the expected bins are
// known exactly.  A complex tone on bin k0 must appear in channel 2*k0 with
// amplitude 0.5*A (A at the DATA_W scale) and nothing in the other thru
// channels; a tone at bin k0 + 1/2 must appear in channel 2*k0+1 (the
// half-bin shifted channelizer) with the other shifted channels empty.
// Also checks one output frame per N input samples.
module tb_coarse_channelizer;
  import lxm_pkg::*;
  localparam int N = 8;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic adc_valid = 0;
  logic signed [13:0] adc_i = 0, adc_q = 0;
  cfg_t cfg = '0;
  logic out_valid;
  cplx_t oc [2*N];
  coarse_channelizer #(.N(N)) dut (.clk, .rst_n, .adc_valid, .adc_i, .adc_q, .cfg, .out_valid, .out_chan(oc));

  int frames = 0;
  always @(posedge clk) if (out_valid) frames++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mag(input cplx_t c);
    return $sqrt(real'(c.re) * real'(c.re) + real'(c.im) * real'(c.im));
  endfunction

  task automatic run_tone(input real bin, input int exp_ch, input int other_par);
    int n0 = frames;
    for (int n = 0; n < 6*N; n++) begin
      @(negedge clk);
      adc_valid = 1;
      adc_i = 14'($rtoi(4000.0 * $cos(TWO_PI * bin * n / N)));
      adc_q = 14'($rtoi(4000.0 * $sin(TWO_PI * bin * n / N)));
    end
    @(negedge clk); adc_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (frames - n0 != 6) begin failures++; $display("FAIL frames %0d", frames - n0); end
    checks++;
    if (mag(oc[exp_ch]) < 31000.0 || mag(oc[exp_ch]) > 33000.0) begin
      failures++; $display("FAIL bin %f channel %0d magnitude %f", bin, exp_ch, mag(oc[exp_ch]));
    end
    for (int c = other_par; c < 2*N; c += 2)
      if (c != exp_ch) begin
        checks++;
        if (mag(oc[c]) > 300.0) begin failures++; $display("FAIL leak bin %f channel %0d %f", bin, c, mag(oc[c])); end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8*N; a++) begin
      @(negedge clk);
      cfg.we = 1; cfg.addr = {REG_CHAN, 20'(a)}; cfg.data = (a < N) ? 32'd65536 : 32'd0;
    end
    @(negedge clk); cfg.we = 0;
    run_tone(2.0, 4, 0);
    run_tone(5.0, 10, 0);
    run_tone(3.5, 7, 1);
    run_tone(6.5, 13, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
