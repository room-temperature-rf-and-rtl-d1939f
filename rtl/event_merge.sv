// event_merge: joins the outputs of the demodulators into the single
// sample stream of the event processor.
//
// Each demodulator delivers at most one (channel, value) per clock and at
// most CPD per flux-ramp period; each input has a DEPTH-entry FIFO, and a
// round-robin arbiter moves one entry per clock to the output, where the
// channel becomes global: demodulator d, slot j -> channel d*CPD + j.
// overflow is sticky and set if a sample arrives at a full FIFO (it is
// then lost).  Latency: one clock through an empty FIFO.
//
// The design feeds four demodulators into one event processor; the FIFO
// and round-robin arbitration are this implementation's.
module event_merge #(
  parameter int ND    = lxm_pkg::N_DEMOD,
  parameter int CPD   = lxm_pkg::N_FFT_MAIN / lxm_pkg::N_DEMOD,
  parameter int W     = 32,
  parameter int DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid [ND],
  input  logic [$clog2(CPD)-1:0]        in_chan  [ND],
  input  logic signed [W-1:0]           in_data  [ND],
  output logic                          out_valid,
  output logic [$clog2(ND*CPD)-1:0]     out_chan,
  output logic signed [W-1:0]           out_data,
  output logic                          overflow
);
  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(CPD);
  localparam int DW = (ND > 1) ? $clog2(ND) : 1;

  logic [CW-1:0]        q_ch [ND][DEPTH];
  logic signed [W-1:0]  q_d  [ND][DEPTH];
  logic [PW:0]          wp [ND];
  logic [PW:0]          rp [ND];
  logic [DW-1:0]        rr;

  logic          pick_ok;
  logic [DW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = ND-1; k >= 0; k--) begin
      int d;
      d = (int'(rr) + k) % ND;
      if (wp[d] != rp[d]) begin pick_ok = 1'b1; pick = DW'(d); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < ND; d++) begin wp[d] <= '0; rp[d] <= '0; end
      rr <= '0; overflow <= 1'b0;
      out_valid <= 1'b0; out_chan <= '0; out_data <= '0;
    end else begin
      for (int d = 0; d < ND; d++)
        if (in_valid[d]) begin
          if ((wp[d] - rp[d]) == (PW+1)'(DEPTH)) overflow <= 1'b1;
          else begin
            q_ch[d][wp[d][PW-1:0]] <= in_chan[d];
            q_d[d][wp[d][PW-1:0]]  <= in_data[d];
            wp[d] <= wp[d] + 1'b1;
          end
        end
      out_valid <= pick_ok;
      if (pick_ok) begin
        out_chan   <= ($clog2(ND*CPD))'(int'(pick) * CPD + int'(q_ch[pick][rp[pick][PW-1:0]]));
        out_data   <= q_d[pick][rp[pick][PW-1:0]];
        rp[pick]   <= rp[pick] + 1'b1;
        rr         <= (int'(pick) == ND-1) ? '0 : pick + 1'b1;
      end
    end
  end
endmodule
