// freq_shift: shifts a complex sample stream by half an FFT bin.
//
// Sample n is multiplied by exp(j*SIGN*pi*n/N), i.e. the spectrum moves by
// SIGN * fs/(2N), half the bin width of an N-point channelizer.  The phasor
// repeats every 2N samples and is read from a 2N-entry table built at
// elaboration (lxm_pkg::cos_sin, Q1.16).  A sample counter advances on every
// in_valid from reset.  Latency: one clock.
//
// The half-bin shift that lets a second PFB channelizer cover the gaps
// between the +-30 % pass-bands of the first follows the design; the
// table-based complex multiplier is this implementation's.
module freq_shift #(
  parameter int N      = lxm_pkg::N_FFT_MAIN,
  parameter int SIGN   = 1,           // +1 shift up, -1 shift down
  parameter int DATA_W = lxm_pkg::DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  lxm_pkg::cplx_t in_data,
  output logic           out_valid,
  output lxm_pkg::cplx_t out_data
);
  import lxm_pkg::*;
  localparam int TF = 16;
  localparam int PW = DATA_W + TF + 3;

  logic signed [TF+1:0] c_t [2*N];
  logic signed [TF+1:0] s_t [2*N];
  for (genvar n = 0; n < 2*N; n++) begin : g_tab
    localparam logic [PHASE_W-1:0] PH = PHASE_W'((n * (2**PHASE_W)) / (2*N));
    localparam logic [63:0] CS = cos_sin(SIGN > 0 ? PH : PHASE_W'(-PH), 2**TF);
    assign c_t[n] = (TF+2)'($signed(CS[63:32]));
    assign s_t[n] = (TF+2)'($signed(CS[31:0]));
  end

  logic [$clog2(2*N)-1:0] cnt;
  logic signed [PW-1:0]   pr, pi;

  always_comb begin
    pr = (PW'(in_data.re) * PW'(c_t[cnt]) - PW'(in_data.im) * PW'(s_t[cnt])) >>> TF;
    pi = (PW'(in_data.re) * PW'(s_t[cnt]) + PW'(in_data.im) * PW'(c_t[cnt])) >>> TF;
  end

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > PW'((2**(DATA_W-1))-1))   return DATA_W'((2**(DATA_W-1))-1);
    else if (v < -PW'(2**(DATA_W-1))) return DATA_W'(-(2**(DATA_W-1)));
    else                              return DATA_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cnt         <= cnt + 1'b1;
        out_data.re <= sat(pr);
        out_data.im <= sat(pi);
      end
    end
  end
endmodule
