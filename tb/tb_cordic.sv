// tb_cordic: checks both CORDIC modes against real-number math.
// Vectoring: angle of random (x, y) within 3 LSB (plus the shift truncation
// of small vectors) of atan2 and magnitude
// within 0.1 % of 1.6468*|v|.  Rotation: rotated vector within 4 LSB of
// the exact rotation times the CORDIC gain (plus 3e-4 relative).  Also checks the latency of
// ITERS + 1 clocks and that the tag travels with its sample.
module tb_cordic;
  import lxm_pkg::*;
  localparam real GAIN = 1.646760258;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v_in, r_in;
  logic signed [17:0] x, y;
  logic [15:0] z;
  logic [7:0] tag;
  logic v_out, r_out;
  logic signed [19:0] vx, vy, rx, ry;
  logic [15:0] vz, rz;
  logic [7:0] vt, rt;

  cordic #(.W(20), .IN_W(18), .VECTORING(1'b1)) u_v (.clk, .rst_n, .in_valid(v_in), .x_in(x), .y_in(y),
    .z_in(16'd0), .tag_in(tag), .out_valid(v_out), .x_out(vx), .y_out(vy), .z_out(vz), .tag_out(vt));
  cordic #(.W(20), .IN_W(18), .VECTORING(1'b0)) u_r (.clk, .rst_n, .in_valid(r_in), .x_in(x), .y_in(y),
    .z_in(z), .tag_in(tag), .out_valid(r_out), .x_out(rx), .y_out(ry), .z_out(rz), .tag_out(rt));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    v_in = 0; r_in = 0; x = 0; y = 0; z = 0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real ang, mag, ex, ey, ea, c, s, th, tol;
      int lat;
      x = 18'($signed($urandom_range(0, 200000)) - 100000);
      y = 18'($signed($urandom_range(0, 200000)) - 100000);
      z = 16'($urandom);
      tag = 8'(n);
      @(negedge clk); v_in = 1; r_in = 1;
      @(negedge clk); v_in = 0; r_in = 0;
      lat = 1;
      while (!v_out) begin @(negedge clk); lat++; end
      chk(lat == 17, $sformatf("latency %0d", lat));
      // vectoring reference
      ang = $atan2(real'(y), real'(x)) / TWO_PI * 65536.0;
      if (ang < 0) ang += 65536.0;
      ea = real'(vz) - ang;
      if (ea > 32768.0) ea -= 65536.0;
      if (ea < -32768.0) ea += 65536.0;
      mag = $sqrt(real'(x)*real'(x) + real'(y)*real'(y)) * GAIN;
      // 3 LSB plus the truncation of ITERS shifted terms relative to |v|
      tol = 3.0 + 16.0 * 65536.0 / (TWO_PI * mag / GAIN + 1.0);
      chk(ea < tol && ea > -tol, $sformatf("angle x=%0d y=%0d got %0d want %f", x, y, vz, ang));
      if (mag > 1000.0) chk((real'(vx) - mag) / mag < 0.001 && (real'(vx) - mag) / mag > -0.001, "magnitude");
      chk(vt == 8'(n), "vector tag");
      // rotation reference
      th = real'(z) / 65536.0 * TWO_PI;
      c = $cos(th); s = $sin(th);
      ex = GAIN * (real'(x) * c - real'(y) * s);
      ey = GAIN * (real'(x) * s + real'(y) * c);
      chk(r_out && rt == 8'(n), "rotation valid/tag");
      // tolerance: 4 LSB plus the 16-bit phase resolution (~3e-4 relative)
      tol = 4.0 + 3.0e-4 * $sqrt(ex*ex + ey*ey);
      chk((real'(rx) - ex) < tol && (real'(rx) - ex) > -tol && (real'(ry) - ey) < tol && (real'(ry) - ey) > -tol,
          $sformatf("rotate got %0d,%0d want %f,%f", rx, ry, ex, ey));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
