// dds: time-multiplexed direct digital synthesizer, one phase accumulator
// per channel.
//
// Every in_valid sample belongs to channel in_chan.  The channel's phase
// accumulator advances by its frequency word, the channel's phase offset is
// added, and a rotation-mode CORDIC turns the vector (A, 0) by that phase,
// giving cos and sin with amplitude AMP.  restart zeroes the accumulator of
// the channel being served (used to lock a tone to the flux-ramp reset).
// Frequency words and phase offsets are written per channel through the
// wr_* port (wr_sel 0: frequency, 1: phase offset).  Latency: ITERS + 2.
//
// A DDS as the LO of a digital mixer follows the design; the CORDIC sine
// generator (instead of a sine table) and the per-channel write port are
// this implementation's choices.
module dds #(
  parameter int NCH   = 32,
  parameter int OUT_W = 18,
  parameter int AMP   = 100000,     // output amplitude (must fit OUT_W+1 bits)
  parameter int TAG_W = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [$clog2(NCH)-1:0]       in_chan,
  input  logic                         restart,
  input  logic [TAG_W-1:0]             tag_in,
  input  logic                         wr_en,
  input  logic                         wr_sel,
  input  logic [$clog2(NCH)-1:0]       wr_chan,
  input  logic [lxm_pkg::PHASE_W-1:0]  wr_data,
  output logic                         out_valid,
  output logic signed [OUT_W-1:0]      cos_out,
  output logic signed [OUT_W-1:0]      sin_out,
  output logic [TAG_W-1:0]             tag_out
);
  import lxm_pkg::*;
  localparam int CW = OUT_W + 2;
  // pre-scale by the CORDIC gain: A / 1.6467602 (Q30 constant 0.6072529)
  localparam longint XIN = (longint'(AMP) * 64'sd652032874) >>> 30;

  logic [PHASE_W-1:0] freq  [NCH];
  logic [PHASE_W-1:0] poff  [NCH];
  logic [PHASE_W-1:0] acc   [NCH];

  logic               v1;
  logic [PHASE_W-1:0] ph1;
  logic [TAG_W-1:0]   tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        freq[c] <= '0; poff[c] <= '0; acc[c] <= '0;
      end
      v1 <= 1'b0; ph1 <= '0; tag1 <= '0;
    end else begin
      if (wr_en) begin
        if (wr_sel) poff[wr_chan] <= wr_data;
        else        freq[wr_chan] <= wr_data;
      end
      v1   <= in_valid;
      tag1 <= tag_in;
      if (in_valid) begin
        if (restart) begin
          acc[in_chan] <= freq[in_chan];
          ph1          <= poff[in_chan];
        end else begin
          acc[in_chan] <= acc[in_chan] + freq[in_chan];
          ph1          <= acc[in_chan] + poff[in_chan];
        end
      end
    end
  end

  logic signed [CW-1:0] xo, yo;
  logic [PHASE_W-1:0]   zo;
  cordic #(.W(CW), .IN_W(CW), .VECTORING(1'b0), .TAG_W(TAG_W)) u_rot (
    .clk, .rst_n,
    .in_valid(v1), .x_in(CW'(XIN)), .y_in('0), .z_in(ph1), .tag_in(tag1),
    .out_valid, .x_out(xo), .y_out(yo), .z_out(zo), .tag_out
  );
  assign cos_out = OUT_W'(xo);
  assign sin_out = OUT_W'(yo);
endmodule
