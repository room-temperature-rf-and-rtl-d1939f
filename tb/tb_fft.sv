// tb_fft: random frames through a 16-point forward FFT and inverse FFT,
// compared with a direct DFT computed here in real arithmetic
// (forward scaled by 1/N within 4 LSB, inverse unscaled within 16 LSB:
// its truncation errors are not divided down).  Also checks the log2(N)+1
// clock latency and that back-to-back frames stay separate.
module tb_fft;
  import lxm_pkg::*;
  localparam int N = 16;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, fv, iv;
  cplx_t fin [N];
  cplx_t fo  [N];
  cplx_t io  [N];
  fft #(.N(N), .INVERSE(1'b0)) u_f (.clk, .rst_n, .in_valid, .in_frame(fin), .out_valid(fv), .out_frame(fo));
  fft #(.N(N), .INVERSE(1'b1)) u_i (.clk, .rst_n, .in_valid, .in_frame(fin), .out_valid(iv), .out_frame(io));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [4][N];
  real xi [4][N];

  initial begin
    int got = 0;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // four frames back to back; amplitudes small enough for the unscaled inverse
    fork
      begin
        for (int f = 0; f < 4; f++) begin
          for (int k = 0; k < N; k++) begin
            fin[k].re = 18'($signed($urandom_range(0, 16000)) - 8000);
            fin[k].im = 18'($signed($urandom_range(0, 16000)) - 8000);
            xr[f][k] = real'(fin[k].re); xi[f][k] = real'(fin[k].im);
          end
          in_valid = 1;
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        lat = 0;
        while (!fv) begin @(negedge clk); lat++; end
        checks++;
        if (lat != $clog2(N) + 1) begin failures++; $display("FAIL latency %0d", lat); end
        for (int f = 0; f < 4; f++) begin
          for (int m = 0; m < N; m++) begin
            real fr, fi, ir, ii;
            fr = 0; fi = 0; ir = 0; ii = 0;
            for (int n = 0; n < N; n++) begin
              real a;
              a = TWO_PI * real'(m * n) / real'(N);
              fr += xr[f][n] * $cos(a) + xi[f][n] * $sin(a);
              fi += xi[f][n] * $cos(a) - xr[f][n] * $sin(a);
              ir += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
              ii += xi[f][n] * $cos(a) + xr[f][n] * $sin(a);
            end
            fr /= N; fi /= N;
            checks += 2;
            if ((real'(fo[m].re) - fr) > 4.0 || (real'(fo[m].re) - fr) < -4.0 ||
                (real'(fo[m].im) - fi) > 4.0 || (real'(fo[m].im) - fi) < -4.0) begin
              failures++; $display("FAIL fwd f%0d bin %0d got %0d,%0d want %f,%f", f, m, fo[m].re, fo[m].im, fr, fi);
            end
            if ((real'(io[m].re) - ir) > 16.0 || (real'(io[m].re) - ir) < -16.0 ||
                (real'(io[m].im) - ii) > 16.0 || (real'(io[m].im) - ii) < -16.0) begin
              failures++; $display("FAIL inv f%0d bin %0d got %0d,%0d want %f,%f", f, m, io[m].re, io[m].im, ir, ii);
            end
          end
          got++;
          checks++;
          if (!fv || !iv) begin failures++; $display("FAIL valid"); end
          @(negedge clk);
        end
      end
    join
    checks++;
    if (fv) begin failures++; $display("FAIL extra frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
