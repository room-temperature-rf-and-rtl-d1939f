// tb_channel_select: N = 8, four demodulators of two slots.  Writes a
// routing table (slot -> channel, some slots disabled), sends channel
// frames with a distinct value per channel and checks that every
// demodulator receives, slot by slot on consecutive clocks, the value of
// the channel its slot names.  Returns tones from the demodulators and
// checks that the next tone frame carries them on the named channels of
// enabled slots and zero everywhere else.
module tb_channel_select;
  import lxm_pkg::*;
  localparam int N = 8, ND = 4, CPD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cfg_t cfg = '0;
  logic frame_valid = 0;
  cplx_t frame [2*N];
  logic rx_valid [ND];
  logic [0:0] rx_slot [ND];
  cplx_t rx_data [ND];
  logic tx_valid [ND];
  logic [0:0] tx_slot [ND];
  cplx_t tx_data [ND];
  logic fo_v;
  cplx_t fo [2*N];
  channel_select #(.N(N), .ND(ND)) dut (.clk, .rst_n, .cfg, .frame_valid, .frame, .rx_valid, .rx_slot, .rx_data,
    .tx_valid, .tx_slot, .tx_data, .frame_out_valid(fo_v), .frame_out(fo));

  int sel [ND][CPD];
  bit en [ND][CPD];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < ND; d++) begin tx_valid[d] = 0; tx_slot[d] = 0; tx_data[d] = '0; end
    for (int c = 0; c < 2*N; c++) frame[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < ND; d++)
      for (int j = 0; j < CPD; j++) begin
        sel[d][j] = (5 * (d*CPD + j) + 3) % (2*N);
        en[d][j]  = !(d == 2 && j == 1);
        @(negedge clk);
        cfg.we = 1; cfg.addr = {REG_SEL, 20'(d*CPD + j)}; cfg.data = {15'd0, en[d][j], 16'(sel[d][j])};
      end
    @(negedge clk); cfg.we = 0;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 2*N; c++) begin frame[c].re = 18'(c*100 + r); frame[c].im = 18'(-c); end
      frame_valid = 1;
      @(negedge clk); frame_valid = 0;
      // the previous round's tones come out with this frame
      checks++;
      if (!fo_v) begin failures++; $display("FAIL no tone frame"); end
      if (r > 0)
        for (int c = 0; c < 2*N; c++) begin
          logic signed [17:0] want;
          want = 0;
          for (int d = 0; d < ND; d++) for (int j = 0; j < CPD; j++)
            if (en[d][j] && sel[d][j] == c) want = 18'(1000*d + 10*j + r - 1);
          checks++;
          if (fo[c].re != want) begin failures++; $display("FAIL tone ch %0d got %0d want %0d", c, fo[c].re, want); end
        end
      @(negedge clk);    // slot 0 appears two clocks after the frame strobe
      for (int j = 0; j < CPD; j++) begin
        for (int d = 0; d < ND; d++) begin
          checks++;
          if (!rx_valid[d] || rx_slot[d] != 1'(j) || rx_data[d].re != 18'(sel[d][j]*100 + r)) begin
            failures++; $display("FAIL rx d%0d slot %0d got %0d", d, j, rx_data[d].re);
          end
          tx_valid[d] = 1; tx_slot[d] = 1'(j); tx_data[d].re = 18'(1000*d + 10*j + r); tx_data[d].im = 0;
        end
        @(negedge clk);
      end
      for (int d = 0; d < ND; d++) begin
        checks++;
        if (rx_valid[d]) begin failures++; $display("FAIL rx beyond slots"); end
        tx_valid[d] = 0;
      end
      repeat (6) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
