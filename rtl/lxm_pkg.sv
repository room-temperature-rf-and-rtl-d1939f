// lxm_pkg: constants, types and helper functions shared by the readout
// firmware of one 1-GHz RF block (microwave SQUID multiplexer readout).
//
// Numbers taken from the design description: FFT size 128 for the main
// array, 8-tap PFB, 4 demodulators of N_FFT/4 channels, 16-tap demod FIR,
// 14-bit converters, record and pretrigger lengths of the main array.
// Word widths, the phase format and the configuration bus are this
// implementation's own choices.
//
// Phase format: unsigned PHASE_W-bit word, full scale = one turn (2*pi).
// Configuration bus: a write-only register bus (cfg_t); bits [23:20] of the
// address select a block region, the rest address a register inside it.
package lxm_pkg;

  // ---------------- array / firmware dimensions ----------------
  localparam int N_FFT_MAIN   = 128;   // FFT size, main array
  localparam int PFB_TAPS     = 8;     // taps per polyphase branch
  localparam int N_DEMOD      = 4;     // demodulators per RF block
  localparam int DEMOD_TAPS   = 16;    // low-pass FIR in the demodulator
  localparam int CONV_W       = 14;    // ADC / DAC resolution
  localparam int DATA_W       = 18;    // internal sample width
  localparam int PHASE_W      = 16;    // phase word width (one turn = 2**16)
  localparam int CORDIC_ITERS = 16;

  // ---------------- configuration bus ----------------
  typedef struct packed {
    logic        we;
    logic [23:0] addr;
    logic [31:0] data;
  } cfg_t;

  // address regions (cfg.addr[23:20])
  localparam logic [3:0] REG_CHAN   = 4'h1;  // analysis PFB coefficients
  localparam logic [3:0] REG_DECHAN = 4'h2;  // synthesis PFB coefficients
  localparam logic [3:0] REG_SEL    = 4'h3;  // channel-select tables
  localparam logic [3:0] REG_DEMOD0 = 4'h4;  // demodulator d at REG_DEMOD0+d
  localparam logic [3:0] REG_EVENT  = 4'h8;  // event processor
  localparam logic [3:0] REG_TMPL   = 4'h9;  // optimal filter templates

  // ---------------- complex sample ----------------
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // ---------------- event grades ----------------
  typedef enum logic [1:0] {GRADE_HR = 2'd0, GRADE_MR = 2'd1, GRADE_LR = 2'd2} grade_e;

  // arctan(2^-i) in phase units (2^16 per turn):
  //   round(atan(2^-i) / (2*pi) * 65536), i = 0..15
  function automatic logic [PHASE_W-1:0] atan_lut(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;  3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;   6: return 16'd163;   7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;   10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;   13: return 16'd1;    14: return 16'd1;    default: return 16'd0;
    endcase
  endfunction

  // Integer cosine/sine of a phase word, computed by a CORDIC rotation.
  // Returns round(amp*cos) in [63:32] and round(amp*sin) in [31:0].
  // Used at elaboration to build twiddle/shift tables (no real arithmetic).
  function automatic logic [63:0] cos_sin(input logic [PHASE_W-1:0] ph, input int amp);
    longint x, y, xn, z;
    logic [1:0] quad;
    logic [PHASE_W-1:0] r;
    // CORDIC gain K = 0.607252935 -> pre-scale by K (Q30)
    x = (longint'(amp) * 64'sd652032874) >>> 30;
    y = 0;
    quad = ph[PHASE_W-1 -: 2];
    r = ph - {quad, {(PHASE_W-2){1'b0}}};              // 0 .. quarter turn
    z = longint'(r);
    if (z > 64'sd8192) begin z = z - 64'sd16384; quad = quad + 2'd1; end  // fold to +-1/8 turn
    for (int i = 0; i < CORDIC_ITERS; i++) begin
      if (z >= 0) begin xn = x - (y >>> i); y = y + (x >>> i); z = z - longint'(atan_lut(i)); end
      else        begin xn = x + (y >>> i); y = y - (x >>> i); z = z + longint'(atan_lut(i)); end
      x = xn;
    end
    case (quad)
      2'd0: return {32'(x),  32'(y)};
      2'd1: return {32'(-y), 32'(x)};
      2'd2: return {32'(-x), 32'(-y)};
      default: return {32'(y), 32'(-x)};
    endcase
  endfunction

endpackage
