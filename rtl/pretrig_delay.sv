// pretrig_delay: per-channel circular-buffer delay (pretrigger delay).
//
// One block-RAM-style array holds DEPTH samples for each of NCH channels.
// A sample of channel c is written at c's write pointer, and the sample
// written DEPTH samples of that channel earlier is read out at the same
// time, so each channel's stream comes out delayed by DEPTH of its own
// samples.  out_time is the channel-local index of the sample that leaves
// (samples counted from reset); out_valid rises only once a channel's
// buffer has filled.  Latency: one clock.
//
// The circular buffer in block RAM follows the design; the depth (enough
// to hold the longest pretrigger plus the time needed to identify the hydra
// pixel) and the time tag are this implementation's.
module pretrig_delay #(
  parameter int NCH   = 128,
  parameter int W     = 32,
  parameter int DEPTH = 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [$clog2(NCH)-1:0]  in_chan,
  input  logic signed [W-1:0]     in_data,
  output logic                    out_valid,
  output logic [$clog2(NCH)-1:0]  out_chan,
  output logic signed [W-1:0]     out_data,
  output logic [31:0]             out_time
);
  localparam int AW = $clog2(DEPTH);

  logic signed [W-1:0] mem [NCH*DEPTH];
  logic [31:0]         cnt [NCH];

  logic [$clog2(NCH*DEPTH)-1:0] addr;
  assign addr = {in_chan, cnt[in_chan][AW-1:0]};

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_data  <= mem[addr];
      mem[addr] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) cnt[c] <= '0;
      out_valid <= 1'b0; out_chan <= '0; out_time <= '0;
    end else begin
      out_valid <= in_valid && cnt[in_chan] >= 32'(DEPTH);
      if (in_valid) begin
        cnt[in_chan] <= cnt[in_chan] + 1'b1;
        out_chan     <= in_chan;
        out_time     <= cnt[in_chan] - 32'(DEPTH);
      end
    end
  end
endmodule
