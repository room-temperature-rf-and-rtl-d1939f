// demodulator: one of the four flux-ramp demodulators of an RF block.
//
// It serves NCH = N/4 channel slots, time-multiplexed, one sample per
// clock.  For each channel sample from the channel select it
//   - mixes the channel (still at an intermediate frequency inside its bin)
//     to zero frequency with a digital LO.  I and Q rows of the mixer use
//     two independent DDSs, so a phase error between the analog I and Q
//     paths can be trimmed by their phase offsets:
//         y_i = x_i*cos(ph_I) + x_q*sin(ph_I)
//         y_q = x_q*cos(ph_Q) - x_i*sin(ph_Q)
//   - produces the channel's probe tone with two more independent DDSs at
//     the same frequency (tone = cos(ph_TI) + j*sin(ph_TQ)), sent back to
//     the tone-generating channelizer through the channel select,
//   - low-pass filters with the 16-tap FIR,
//   - subtracts the fitted arc centre, rotates the arc onto the +x axis
//     with a CORDIC and takes its angle with a second CORDIC,
//   - demodulates the flux-ramp modulation (flux_ramp_demod) to one value
//     per channel and ramp.
//
// Configuration (cfg region lxm_pkg::REG_DEMOD0 + DEMOD_ID), address bits
// [19:16] select:  0..3 DDS LO-I, LO-Q, tone-I, tone-Q (bit 8: 0 frequency,
// 1 phase offset; bits [7:0] channel), 4 FIR tap (bits [3:0]),
// 5/6 arc centre I/Q (channel), 7 arc rotation angle (channel, the angle
// the arc is turned by), 8 flux-ramp DDS (as 0..3), 9 mask length,
// 10 integration length.  Phase values are PHASE_W-bit turns.
//
// The chain follows the design; the register map, the fixed tone amplitude
// and the exact mixer sign convention are this implementation's.
module demodulator #(
  parameter int            NCH      = lxm_pkg::N_FFT_MAIN / lxm_pkg::N_DEMOD,
  parameter logic [3:0]    DEMOD_ID = 4'd0,
  parameter int            TONE_AMP = 8192
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  lxm_pkg::cfg_t             cfg,
  input  logic                      fr_sync,
  input  logic                      in_valid,
  input  logic [$clog2(NCH)-1:0]    in_chan,
  input  lxm_pkg::cplx_t            in_data,
  output logic                      tone_valid,
  output logic [$clog2(NCH)-1:0]    tone_chan,
  output lxm_pkg::cplx_t            tone_data,
  output logic                      out_valid,
  output logic [$clog2(NCH)-1:0]    out_chan,
  output logic signed [31:0]        out_phase
);
  import lxm_pkg::*;
  localparam int CHW = $clog2(NCH);

  // ---------------- configuration decode ----------------
  logic       mine;
  logic [3:0] sub;
  assign mine = cfg.we && cfg.addr[23:20] == (REG_DEMOD0 + DEMOD_ID);
  assign sub  = cfg.addr[19:16];

  logic signed [DATA_W-1:0]  ctr_i [NCH];
  logic signed [DATA_W-1:0]  ctr_q [NCH];
  logic [PHASE_W-1:0]        rot   [NCH];
  logic [15:0]               mask_len, int_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin ctr_i[c] <= '0; ctr_q[c] <= '0; rot[c] <= '0; end
      mask_len <= 16'd0;
      int_len  <= 16'd1;
    end else if (mine) begin
      case (sub)
        4'd5:  ctr_i[cfg.addr[CHW-1:0]] <= DATA_W'(cfg.data);
        4'd6:  ctr_q[cfg.addr[CHW-1:0]] <= DATA_W'(cfg.data);
        4'd7:  rot[cfg.addr[CHW-1:0]]   <= PHASE_W'(cfg.data);
        4'd9:  mask_len                 <= cfg.data[15:0];
        4'd10: int_len                  <= cfg.data[15:0];
        default: ;
      endcase
    end
  end

  // ---------------- the four mixer/tone DDSs ----------------
  localparam int TG = 2*DATA_W + CHW;
  logic                 d_v   [4];
  logic signed [17:0]   d_cos [4];
  logic signed [17:0]   d_sin [4];
  logic [TG-1:0]        d_tag [4];
  for (genvar k = 0; k < 4; k++) begin : g_dds
    dds #(.NCH(NCH), .OUT_W(18), .AMP(k < 2 ? 65536 : TONE_AMP), .TAG_W(TG)) u_dds (
      .clk, .rst_n, .in_valid, .in_chan, .restart(1'b0),
      .tag_in({in_data.re, in_data.im, in_chan}),
      .wr_en(mine && sub == 4'(k)), .wr_sel(cfg.addr[8]), .wr_chan(cfg.addr[CHW-1:0]),
      .wr_data(PHASE_W'(cfg.data)),
      .out_valid(d_v[k]), .cos_out(d_cos[k]), .sin_out(d_sin[k]), .tag_out(d_tag[k]));
  end

  // probe tones back to the channel select
  assign tone_valid   = d_v[2];
  assign tone_chan    = d_tag[2][CHW-1:0];
  assign tone_data.re = DATA_W'(d_cos[2]);
  assign tone_data.im = DATA_W'(d_sin[3]);

  // ---------------- fine-tuning mixer ----------------
  logic signed [DATA_W-1:0] x_i, x_q;
  logic [CHW-1:0]           x_ch;
  assign {x_i, x_q, x_ch} = d_tag[0];

  localparam int MW = DATA_W + 20;
  logic signed [MW-1:0] mi, mq;
  assign mi = (MW'(x_i) * MW'(d_cos[0]) + MW'(x_q) * MW'(d_sin[0])) >>> 16;
  assign mq = (MW'(x_q) * MW'(d_cos[1]) - MW'(x_i) * MW'(d_sin[1])) >>> 16;

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [MW-1:0] v);
    if (v > MW'((2**(DATA_W-1))-1))   return DATA_W'((2**(DATA_W-1))-1);
    else if (v < -MW'(2**(DATA_W-1))) return DATA_W'(-(2**(DATA_W-1)));
    else                              return DATA_W'(v);
  endfunction

  logic           m_v;
  logic [CHW-1:0] m_ch;
  cplx_t          m_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_v <= 1'b0; m_ch <= '0; m_d <= '0;
    end else begin
      m_v     <= d_v[0];
      m_ch    <= x_ch;
      m_d.re  <= sat(mi);
      m_d.im  <= sat(mq);
    end
  end

  // ---------------- 16-tap low-pass ----------------
  logic           f_v;
  logic [CHW-1:0] f_ch;
  cplx_t          f_d;
  demod_fir #(.NCH(NCH)) u_fir (
    .clk, .rst_n, .in_valid(m_v), .in_chan(m_ch), .in_data(m_d),
    .wr_en(mine && sub == 4'd4), .wr_addr(cfg.addr[3:0]), .wr_data(cfg.data[17:0]),
    .out_valid(f_v), .out_chan(f_ch), .out_data(f_d));

  // ---------------- arc centring ----------------
  logic                      c_v;
  logic [CHW-1:0]            c_ch;
  logic signed [DATA_W:0]    c_i, c_q;
  logic [PHASE_W-1:0]        c_rot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_v <= 1'b0; c_ch <= '0; c_i <= '0; c_q <= '0; c_rot <= '0;
    end else begin
      c_v   <= f_v;
      c_ch  <= f_ch;
      c_i   <= (DATA_W+1)'(f_d.re) - (DATA_W+1)'(ctr_i[f_ch]);
      c_q   <= (DATA_W+1)'(f_d.im) - (DATA_W+1)'(ctr_q[f_ch]);
      c_rot <= rot[f_ch];
    end
  end

  // ---------------- rotate onto +x, then take the angle ----------------
  localparam int RW = DATA_W + 3;
  logic                   r_v;
  logic [CHW-1:0]         r_ch;
  logic signed [RW-1:0]   r_x, r_y;
  logic [PHASE_W-1:0]     r_z;
  cordic #(.W(RW), .IN_W(DATA_W+1), .VECTORING(1'b0), .TAG_W(CHW)) u_rot (
    .clk, .rst_n, .in_valid(c_v), .x_in(c_i), .y_in(c_q), .z_in(c_rot), .tag_in(c_ch),
    .out_valid(r_v), .x_out(r_x), .y_out(r_y), .z_out(r_z), .tag_out(r_ch));

  logic                   a_v;
  logic [CHW-1:0]         a_ch;
  logic signed [RW+1:0]   a_x, a_y;
  logic [PHASE_W-1:0]     a_ph;
  cordic #(.W(RW+2), .IN_W(RW), .VECTORING(1'b1), .TAG_W(CHW)) u_ang (
    .clk, .rst_n, .in_valid(r_v), .x_in(r_x), .y_in(r_y), .z_in('0), .tag_in(r_ch),
    .out_valid(a_v), .x_out(a_x), .y_out(a_y), .z_out(a_ph), .tag_out(a_ch));

  // ---------------- flux-ramp demodulation ----------------
  flux_ramp_demod #(.NCH(NCH)) u_frd (
    .clk, .rst_n, .fr_sync,
    .in_valid(a_v), .in_chan(a_ch), .in_phase(a_ph),
    .mask_len, .int_len,
    .dds_wr_en(mine && sub == 4'd8), .dds_wr_sel(cfg.addr[8]), .dds_wr_chan(cfg.addr[CHW-1:0]),
    .dds_wr_data(PHASE_W'(cfg.data)),
    .out_valid, .out_chan, .out_phase);
endmodule
