// tb_demodulator: two channel slots, each fed with a resonator response
// that the block has to undo step by step:
//   x[n] = exp(j*2*pi*f*n) * (c0 + r*exp(j*(alpha + a*cos(2*pi*m/8 + phi))))
// f: the channel's offset inside its bin (LO DDS frequency), c0/r/alpha:
// the arc centre, radius and direction (written as centre and rotation
// -alpha), a: the flux-ramp swing, m: sample count since the ramp reset,
// phi: the sensor signal, advancing 0.05 turn per ramp.  With the FIR set
// to a single unit tap, mask 2 and integration over 16 samples, every
// output must equal phi (2**16 per turn, unwrapped).  Also checks the
// probe-tone outputs against TONE_AMP*exp(j*(f*n + tone offset)).
module tb_demodulator;
  import lxm_pkg::*;
  localparam int NCH = 2;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic fr_sync = 0, in_valid = 0, tone_valid, out_valid;
  logic [0:0] in_chan = 0, tone_chan, out_chan;
  cplx_t x = '0, tone;
  logic signed [31:0] out_phase;
  demodulator #(.NCH(NCH), .DEMOD_ID(4'd2), .TONE_AMP(8192)) dut (.clk, .rst_n, .cfg, .fr_sync,
    .in_valid, .in_chan, .in_data(x), .tone_valid, .tone_chan, .tone_data(tone),
    .out_valid, .out_chan, .out_phase);

  int  fw   [NCH] = '{3000, 60000};       // LO frequency words
  int  toff [NCH] = '{0, 10000};          // tone DDS phase offsets
  real phi0 [NCH] = '{0.15, 0.4};
  int  nout [NCH];
  int  nsamp [NCH];
  int  ntone [NCH];

  task automatic wr(input logic [3:0] sub, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg.we = 1; cfg.addr = {REG_DEMOD0 + 4'd2, sub, a}; cfg.data = d;
    @(negedge clk);
    cfg.we = 0;
  endtask

  always @(negedge clk) if (out_valid) begin
    real want;
    int c;
    c = int'(out_chan);
    want = phi0[c] * 65536.0 + real'(nout[c]) * 0.05 * 65536.0;
    checks++;
    if (real'(out_phase) - want > 100.0 || real'(out_phase) - want < -100.0) begin
      failures++; $display("FAIL ch %0d ramp %0d got %0d want %f", c, nout[c], out_phase, want);
    end
    nout[c]++;
  end

  always @(negedge clk) if (tone_valid) begin
    int c;
    real ph, er, ei;
    c = int'(tone_chan);
    ph = TWO_PI * real'((ntone[c] * fw[c] + toff[c]) % 65536) / 65536.0;
    er = 8192.0 * $cos(ph); ei = 8192.0 * $sin(ph);
    checks++;
    if ((real'(tone.re) - er) > 6.0 || (real'(tone.re) - er) < -6.0 || (real'(tone.im) - ei) > 6.0 || (real'(tone.im) - ei) < -6.0) begin
      failures++; $display("FAIL tone ch %0d n %0d got %0d,%0d want %f,%f", c, ntone[c], tone.re, tone.im, er, ei);
    end
    ntone[c]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nout = '{0, 0}; nsamp = '{0, 0}; ntone = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < 4; k++) wr(4'(k), 16'(c), 32'(fw[c]));       // frequencies of the four DDSs
      wr(4'd2, 16'h100 | 16'(c), 32'(toff[c]));                        // tone-I offset
      wr(4'd3, 16'h100 | 16'(c), 32'(toff[c]));                        // tone-Q offset
      wr(4'd5, 16'(c), 32'(20000));                                    // arc centre
      wr(4'd6, 16'(c), -32'sd10000);
      wr(4'd7, 16'(c), 32'(16'(-13107)));                              // rotate by -0.2 turn
      wr(4'd8, 16'(c), 32'd8192);                                      // flux-ramp mixing: 8 samples/period
    end
    for (int t = 0; t < 16; t++) wr(4'd4, 16'(t), t == 0 ? 32'd131071 : 32'd0);
    wr(4'd9, 16'd0, 32'd2);
    wr(4'd10, 16'd0, 32'd16);
    for (int ramp = 0; ramp < 6; ramp++) begin
      @(negedge clk); fr_sync = 1;
      @(negedge clk); fr_sync = 0;
      for (int m = 0; m < 20; m++)
        for (int c = 0; c < NCH; c++) begin
          real lo, ang, zr, zi;
          ang = TWO_PI * (0.2 + 0.1 * $cos(TWO_PI * (real'(m) / 8.0 + phi0[c] + 0.05 * ramp)));
          zr = 20000.0 + 30000.0 * $cos(ang);
          zi = -10000.0 + 30000.0 * $sin(ang);
          lo = TWO_PI * real'((nsamp[c] * fw[c]) % 65536) / 65536.0;
          x.re = 18'($rtoi(zr * $cos(lo) - zi * $sin(lo)));
          x.im = 18'($rtoi(zr * $sin(lo) + zi * $cos(lo)));
          nsamp[c]++;
          in_valid = 1; in_chan = 1'(c);
          @(negedge clk);
          in_valid = 0;
        end
      repeat (100) @(negedge clk);
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (nout[c] != 6) begin failures++; $display("FAIL ch %0d outputs %0d", c, nout[c]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
