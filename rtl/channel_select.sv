// channel_select: the two channel multiplexers between the 500-MHz
// channelizers and the four demodulators.
//
// Receive side: each demodulator d owns CPD = N/4 channel slots.  A table
// entry per slot (d, j) names one of the 2N channelizer channels.  When a
// channel frame arrives it is held, and on CPD consecutive clocks starting
// two clocks after the frame strobe every demodulator receives, one per
// clock, the samples of its slots j = 0..CPD-1 (rx_valid, rx_slot, rx_data
// per demodulator).
// Transmit side: the demodulators return one probe-tone sample per slot
// (tx_valid, tx_slot, tx_data).  Each enabled slot's tone is written to the
// channel the same table entry names; the resulting 2N-channel frame is
// handed to the dechannelizer (frame_out_valid) at the next receive frame
// and the buffer is cleared.  Channels no slot names carry zero.
//
// Table writes: cfg region lxm_pkg::REG_SEL, address d*CPD + j, data[15:0]
// channel, data[16] slot enable.  The table resets to slot (d, j) ->
// channel d*CPD + j, disabled.
//
// The channel multiplexers themselves follow the design; their table,
// timing and the frame handover are this implementation's.
module channel_select #(
  parameter int N  = lxm_pkg::N_FFT_MAIN,
  parameter int ND = lxm_pkg::N_DEMOD
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  lxm_pkg::cfg_t              cfg,
  input  logic                       frame_valid,
  input  lxm_pkg::cplx_t             frame      [2*N],
  output logic                       rx_valid   [ND],
  output logic [$clog2(N/ND)-1:0]    rx_slot    [ND],
  output lxm_pkg::cplx_t             rx_data    [ND],
  input  logic                       tx_valid   [ND],
  input  logic [$clog2(N/ND)-1:0]    tx_slot    [ND],
  input  lxm_pkg::cplx_t             tx_data    [ND],
  output logic                       frame_out_valid,
  output lxm_pkg::cplx_t             frame_out  [2*N]
);
  import lxm_pkg::*;
  localparam int CPD = N / ND;
  localparam int SW  = $clog2(CPD);
  localparam int CW  = $clog2(2*N);

  logic [CW-1:0] sel [ND][CPD];
  logic          en  [ND][CPD];
  cplx_t         hold [2*N];
  cplx_t         acc  [2*N];
  logic [SW:0]   cnt;          // CPD means idle
  logic          busy;

  assign busy = (cnt != (SW+1)'(CPD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < ND; d++)
        for (int j = 0; j < CPD; j++) begin
          sel[d][j] <= CW'(d*CPD + j);
          en[d][j]  <= 1'b0;
        end
      for (int c = 0; c < 2*N; c++) begin hold[c] <= '0; acc[c] <= '0; frame_out[c] <= '0; end
      cnt <= (SW+1)'(CPD);
      frame_out_valid <= 1'b0;
      for (int d = 0; d < ND; d++) begin rx_valid[d] <= 1'b0; rx_slot[d] <= '0; rx_data[d] <= '0; end
    end else begin
      if (cfg.we && cfg.addr[23:20] == REG_SEL) begin
        sel[cfg.addr[SW+$clog2(ND)-1:SW]][cfg.addr[SW-1:0]] <= CW'(cfg.data[15:0]);
        en [cfg.addr[SW+$clog2(ND)-1:SW]][cfg.addr[SW-1:0]] <= cfg.data[16];
      end
      // receive side
      for (int d = 0; d < ND; d++) begin
        rx_valid[d] <= busy;
        rx_slot[d]  <= cnt[SW-1:0];
        rx_data[d]  <= hold[sel[d][cnt[SW-1:0]]];
      end
      if (busy) cnt <= cnt + 1'b1;
      frame_out_valid <= 1'b0;
      if (frame_valid) begin
        hold <= frame;
        cnt  <= '0;
        frame_out       <= acc;
        frame_out_valid <= 1'b1;
        for (int c = 0; c < 2*N; c++) acc[c] <= '0;
      end
      // transmit side: collect tones (a tone arriving with the frame strobe
      // goes to the next frame)
      for (int d = 0; d < ND; d++)
        if (tx_valid[d] && en[d][tx_slot[d]]) acc[sel[d][tx_slot[d]]] <= tx_data[d];
    end
  end
endmodule
