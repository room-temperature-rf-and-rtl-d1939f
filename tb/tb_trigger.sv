// tb_trigger: random-walk channel streams with pulse edges of 1 to 3 samples, three
// channels interleaved.  A reference model kept here (per-channel previous
// sample and derivative, threshold crossing in the chosen direction)
// decides for every sample whether the trigger must fire; the block's flag,
// derivative and pass-through sample are compared with it.  Runs once with
// an up threshold and once with a down threshold.
module tb_trigger;
  localparam int NCH = 3, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fired = 0;

  logic signed [W-1:0] thr = 0;
  logic dir = 0, in_valid = 0, out_valid, out_trig;
  logic [1:0] in_chan = 0, out_chan;
  logic signed [W-1:0] in_data = 0, out_data, out_deriv;
  trigger #(.NCH(NCH), .W(W)) dut (.clk, .rst_n, .thr, .dir, .in_valid, .in_chan, .in_data,
    .out_valid, .out_chan, .out_data, .out_deriv, .out_trig);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xp [NCH], dp [NCH], lv [NCH];
    int rl [NCH];
    bit pr [NCH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin xp[c] = 0; dp[c] = 0; lv[c] = 0; rl[c] = 0; end
    for (int pass = 0; pass < 2; pass++) begin
      dir = 1'(pass);
      thr = pass ? -W'(300) : W'(300);
      for (int n = 0; n < 600; n++) begin
        int c;
        longint x, d;
        bit want;
        c = n % NCH;
        lv[c] += longint'($urandom_range(0, 200)) - 100;
        // pulse edges last 1 to 3 samples, so the derivative stays past
        // the threshold for several samples in a row
        if (rl[c] == 0 && $urandom_range(0, 30) == 0) rl[c] = $urandom_range(1, 3);
        if (rl[c] > 0) begin lv[c] += pass ? -2000 : 2000; rl[c]--; end
        x = lv[c];
        @(negedge clk);
        in_valid = 1; in_chan = 2'(c); in_data = W'(x);
        @(negedge clk);
        in_valid = 0;
        if (pass == 0 && n < NCH) pr[c] = 0;
        d = pr[c] ? x - xp[c] : 0;
        want = pr[c] && (dir ? (dp[c] > longint'(thr) && d <= longint'(thr)) : (dp[c] < longint'(thr) && d >= longint'(thr)));
        checks++;
        if (!out_valid || out_chan != 2'(c) || longint'(out_data) != x || longint'(out_deriv) != d || out_trig != want) begin
          failures++; $display("FAIL pass %0d n %0d trig %0d want %0d deriv %0d want %0d", pass, n, out_trig, want, out_deriv, d);
        end
        if (want) fired++;
        xp[c] = x; dp[c] = d; pr[c] = 1;
      end
    end
    checks++;
    if (fired < 10) begin failures++; $display("FAIL too few triggers %0d", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
