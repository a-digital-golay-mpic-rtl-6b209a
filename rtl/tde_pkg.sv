// tde_pkg: types, constants and fixed-point helpers shared by the Golay-MPIC
// time domain equalizer.
//
// The receiver works on 8 samples per clock (lane j of a word holds sample
// 8m+j). Complex samples are packed structs {re, im}. Widths that follow the
// source design: 9-bit input samples, 18-bit correlator output, 13-bit
// reciprocal, 15-bit equalizer output. The Q-format of the equalizer
// (12 fractional bits) and the reciprocal scale (2^24) are this design's own
// choices.
package tde_pkg;

  localparam int N_LANES   = 8;    // parallelism
  localparam int SAMPLE_W  = 9;    // equalizer input, per component
  localparam int OGC_W     = 18;   // correlator output, per component
  localparam int H_W       = 9;    // channel taps kept in register h
  localparam int RH_W      = 16;   // r-hat = r * h0*/|h0|^2, Q3.12
  localparam int C_W       = 23;   // common term h0* * LUT
  localparam int M_W       = 16;   // h[tau] * common term, Q3.12
  localparam int OUT_W     = 15;   // equalizer output, Q2.12
  localparam int FRAC      = 12;   // fractional bits of r-hat, m and output
  localparam int TAU_W     = 8;
  localparam int IDX_W     = 11;   // sample index inside the CES (0..1279)
  localparam int OGC_LAT   = 9;    // 8 stages + final adder, one register each

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cpx_in_t;

  typedef struct packed {
    logic signed [H_W-1:0] re;
    logic signed [H_W-1:0] im;
  } cpx_h_t;

  typedef struct packed {
    logic signed [OUT_W-1:0] re;
    logic signed [OUT_W-1:0] im;
  } cpx_out_t;

  // Arithmetic right shift by FRAC then saturation to 16 bits.
  function automatic logic signed [15:0] sat16_shr(input logic signed [47:0] v);
    logic signed [47:0] s;
    s = v >>> FRAC;
    if (s > 48'sd32767)       return 16'sh7fff;
    else if (s < -48'sd32768) return 16'sh8000;
    else                      return s[15:0];
  endfunction

  // Saturation of a 48-bit value to the 15-bit output width.
  function automatic logic signed [OUT_W-1:0] sat_out(input logic signed [47:0] v);
    if (v > 48'sd16383)       return 15'sh3fff;
    else if (v < -48'sd16384) return 15'sh4000;
    else                      return v[OUT_W-1:0];
  endfunction

endpackage
