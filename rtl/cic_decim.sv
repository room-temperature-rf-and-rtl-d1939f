// cic_decim: cascaded integrator-comb decimator, time-multiplexed channels.
//
// Each channel runs ORDER integrators at the input rate; every R-th sample
// of the channel (samples R-1, 2R-1, ...) goes through ORDER comb stages
// (differential delay 1) at the output rate and is divided by the DC gain
// R**ORDER (R a power of two), so a constant input comes out unchanged.
// R = 1 passes samples straight through.  Output one clock after the
// R-th input, tagged with its channel.
//
// Decimation by 4 with a CIC filter follows the design; the order (2), the
// differential delay and the gain normalisation are this implementation's.
module cic_decim #(
  parameter int NCH   = 128,
  parameter int W     = 32,
  parameter int R     = 4,
  parameter int ORDER = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [$clog2(NCH)-1:0]  in_chan,
  input  logic signed [W-1:0]     in_data,
  output logic                    out_valid,
  output logic [$clog2(NCH)-1:0]  out_chan,
  output logic signed [W-1:0]     out_data
);
  localparam int LR = (R > 1) ? $clog2(R) : 1;
  localparam int GW = W + ORDER * $clog2(R) + 1;

  logic signed [GW-1:0] integ [NCH][ORDER];
  logic signed [GW-1:0] comb  [NCH][ORDER];
  logic [LR-1:0]        ph    [NCH];

  logic signed [GW-1:0] ni [ORDER];
  logic signed [GW-1:0] cs [ORDER+1];
  always_comb begin
    ni[0] = integ[in_chan][0] + GW'(in_data);
    for (int k = 1; k < ORDER; k++) ni[k] = integ[in_chan][k] + ni[k-1];
    cs[0] = ni[ORDER-1];
    for (int k = 0; k < ORDER; k++) cs[k+1] = cs[k] - comb[in_chan][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        ph[c] <= '0;
        for (int k = 0; k < ORDER; k++) begin integ[c][k] <= '0; comb[c][k] <= '0; end
      end
      out_valid <= 1'b0; out_chan <= '0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (R == 1) begin
          out_valid <= 1'b1;
          out_chan  <= in_chan;
          out_data  <= in_data;
        end else begin
          for (int k = 0; k < ORDER; k++) integ[in_chan][k] <= ni[k];
          ph[in_chan] <= ph[in_chan] + 1'b1;
          if (ph[in_chan] == LR'(R-1)) begin
            for (int k = 0; k < ORDER; k++) comb[in_chan][k] <= cs[k];
            out_valid <= 1'b1;
            out_chan  <= in_chan;
            out_data  <= W'(cs[ORDER] >>> (ORDER * $clog2(R)));
          end
        end
      end
    end
  end
endmodule
