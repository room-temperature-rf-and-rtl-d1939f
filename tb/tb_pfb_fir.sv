// tb_pfb_fir: loads random prototype coefficients into a 4-branch, 8-tap
// polyphase FIR, feeds random frames and compares every branch output with
// sum_t h[t*N+k]*frame_t[k] (>>> 17, saturated) computed from the frame
// history kept here.  Checks the one-clock latency.
module tb_pfb_fir;
  import lxm_pkg::*;
  localparam int N = 4, T = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, wr_en = 0, out_valid;
  logic [4:0] wr_addr = 0;
  logic signed [17:0] wr_data = 0;
  cplx_t fin [N];
  cplx_t fo  [N];
  pfb_fir #(.N(N), .TAPS(T)) dut (.clk, .rst_n, .in_valid, .in_frame(fin), .wr_en, .wr_addr, .wr_data,
    .out_valid, .out_frame(fo));

  longint h [N*T];
  longint hr [T][N];
  longint hi [T][N];

  function automatic longint sat(input longint v);
    longint s = v >>> 17;
    if (s > 131071) return 131071;
    if (s < -131072) return -131072;
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) for (int k = 0; k < N; k++) begin hr[t][k] = 0; hi[t][k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N*T; a++) begin
      @(negedge clk);
      h[a] = longint'($urandom_range(0, 60000)) - 30000;
      wr_en = 1; wr_addr = 5'(a); wr_data = 18'(h[a]);
    end
    @(negedge clk); wr_en = 0;
    for (int f = 0; f < 30; f++) begin
      for (int t = T-1; t > 0; t--) begin hr[t] = hr[t-1]; hi[t] = hi[t-1]; end
      for (int k = 0; k < N; k++) begin
        fin[k].re = 18'($signed($urandom_range(0, 200000)) - 100000);
        fin[k].im = 18'($signed($urandom_range(0, 200000)) - 100000);
        hr[0][k] = longint'(fin[k].re); hi[0][k] = longint'(fin[k].im);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int k = 0; k < N; k++) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int t = 0; t < T; t++) begin er += h[t*N+k] * hr[t][k]; ei += h[t*N+k] * hi[t][k]; end
        checks++;
        if (longint'(fo[k].re) != sat(er) || longint'(fo[k].im) != sat(ei)) begin
          failures++; $display("FAIL frame %0d branch %0d got %0d want %0d", f, k, fo[k].re, sat(er));
        end
      end
      if (f % 3 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
