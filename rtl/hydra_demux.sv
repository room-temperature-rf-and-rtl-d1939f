// hydra_demux: identifies which of the 5x5 hydra pixels absorbed a photon.
//
// All pixels of a hydra share one TES, but the heat from each pixel reaches
// it through a different link, so the rise time of the pulse tells the
// pixel.  After a trigger on a channel the block counts that channel's
// samples while the derivative stays positive (the pulse is still rising),
// up to RISE_MAX.  The count is compared with NPIX-1 ascending boundaries:
// pixel = number of boundaries the rise time exceeds.  It then reports the
// event (channel, pixel, trigger time in samples of that channel).
// With HYDRA = 0 (ultra-high-resolution array) no rise time is measured:
// the event is reported at the trigger with pixel 0.
// Samples pass through unchanged, one clock later.  A new trigger while a
// rise is being measured restarts the measurement.
//
// Rise-time pixel identification follows the design; the rise-time
// definition (positive-derivative run) and the boundary table written by
// the host are this implementation's.
module hydra_demux #(
  parameter int NCH      = 128,
  parameter int W        = 32,
  parameter int NPIX     = 25,
  parameter int RISE_MAX = 64,
  parameter bit HYDRA    = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [15:0]              bound [NPIX-1],
  input  logic                     in_valid,
  input  logic [$clog2(NCH)-1:0]   in_chan,
  input  logic signed [W-1:0]      in_data,
  input  logic signed [W-1:0]      in_deriv,
  input  logic                     in_trig,
  output logic                     out_valid,
  output logic [$clog2(NCH)-1:0]   out_chan,
  output logic signed [W-1:0]      out_data,
  output logic                     evt_valid,
  output logic [$clog2(NCH)-1:0]   evt_chan,
  output logic [$clog2(NPIX)-1:0]  evt_pix,
  output logic [31:0]              evt_time
);
  logic [31:0]    tcnt  [NCH];
  logic [31:0]    ttrig [NCH];
  logic [15:0]    rise  [NCH];
  logic [NCH-1:0] meas;

  function automatic logic [$clog2(NPIX)-1:0] to_pix(input logic [15:0] r);
    logic [$clog2(NPIX)-1:0] p = '0;
    for (int i = 0; i < NPIX-1; i++) if (r > bound[i]) p = p + 1'b1;
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin tcnt[c] <= '0; ttrig[c] <= '0; rise[c] <= '0; end
      meas <= '0;
      out_valid <= 1'b0; out_chan <= '0; out_data <= '0;
      evt_valid <= 1'b0; evt_chan <= '0; evt_pix <= '0; evt_time <= '0;
    end else begin
      out_valid <= in_valid;
      evt_valid <= 1'b0;
      if (in_valid) begin
        out_chan       <= in_chan;
        out_data       <= in_data;
        tcnt[in_chan]  <= tcnt[in_chan] + 1'b1;
        if (in_trig) begin
          ttrig[in_chan] <= tcnt[in_chan];
          if (HYDRA) begin
            meas[in_chan] <= 1'b1;
            rise[in_chan] <= 16'd1;
          end else begin
            evt_valid <= 1'b1;
            evt_chan  <= in_chan;
            evt_pix   <= '0;
            evt_time  <= tcnt[in_chan];
          end
        end else if (meas[in_chan]) begin
          if (in_deriv <= 0 || rise[in_chan] >= 16'(RISE_MAX)) begin
            meas[in_chan] <= 1'b0;
            evt_valid     <= 1'b1;
            evt_chan      <= in_chan;
            evt_pix       <= to_pix(rise[in_chan]);
            evt_time      <= ttrig[in_chan];
          end else begin
            rise[in_chan] <= rise[in_chan] + 1'b1;
          end
        end
      end
    end
  end
endmodule
