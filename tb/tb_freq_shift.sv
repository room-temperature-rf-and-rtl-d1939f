// tb_freq_shift: random samples through an up-shifter and a down-shifter
// (N = 8) compared with x*exp(+-j*pi*n/N) in real arithmetic (tolerance
// 4 LSB + 3e-4 relative), including a
// gap in in_valid (the phasor must advance only on valid samples).
module tb_freq_shift;
  import lxm_pkg::*;
  localparam int N = 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, uv, dv;
  cplx_t x, yu, yd;
  freq_shift #(.N(N), .SIGN(1))  u_up (.clk, .rst_n, .in_valid, .in_data(x), .out_valid(uv), .out_data(yu));
  freq_shift #(.N(N), .SIGN(-1)) u_dn (.clk, .rst_n, .in_valid, .in_data(x), .out_valid(dv), .out_data(yd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      real a, er, ei, dr, di, tol;
      @(negedge clk);
      x.re = 18'($signed($urandom_range(0, 180000)) - 90000);
      x.im = 18'($signed($urandom_range(0, 180000)) - 90000);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      a  = PI * real'(n % (2*N)) / real'(N);
      er = real'(x.re) * $cos(a) - real'(x.im) * $sin(a);
      ei = real'(x.re) * $sin(a) + real'(x.im) * $cos(a);
      dr = real'(x.re) * $cos(a) + real'(x.im) * $sin(a);
      di = real'(x.im) * $cos(a) - real'(x.re) * $sin(a);
      // 4 LSB plus the table's angle resolution (~3e-4 of the magnitude)
      tol = 4.0 + 3.0e-4 * $sqrt(er*er + ei*ei);
      checks += 3;
      if (!uv || !dv) begin failures++; $display("FAIL valid"); end
      if ((real'(yu.re) - er) > tol || (real'(yu.re) - er) < -tol || (real'(yu.im) - ei) > tol || (real'(yu.im) - ei) < -tol) begin
        failures++; $display("FAIL up n=%0d got %0d,%0d want %f,%f", n, yu.re, yu.im, er, ei);
      end
      if ((real'(yd.re) - dr) > tol || (real'(yd.re) - dr) < -tol || (real'(yd.im) - di) > tol || (real'(yd.im) - di) < -tol) begin
        failures++; $display("FAIL down n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
