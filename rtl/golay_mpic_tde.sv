// golay_mpic_tde: Golay-MPIC time domain equalizer for SC and OFDM (HSI)
// modes of a 60 GHz receiver, 8 samples per clock.
//
// Channel estimation: during a CES/PCES field the received words go through
// the optimized Golay correlator (a 512-tap +/-1 matched filter built from
// a 256-sample memory FIFO and 8 butterfly stages); the comparator keeps
// the two strongest taps of the two-path line-of-sight channel, averaged
// over the two repetitions, with the distance tau between them. The
// correlator is then shut down.
// Equalization: payload words are scaled by conj(h0)/|h0|^2 and the
// second-path replica r-hat[i-tau]*h[tau]/h0 is subtracted (one-tap MPIC).
// Output path: in SC mode the equalized samples are de-rotated by the
// clockwise pi/2 phase shifter and demapped; in OFDM mode they leave
// through eq_out to the receiver's FFT, and its result (fft_out) is
// demapped. The demapper is the 2-bit QPSK one.
//
// Interface timing: r carries one word per cycle; ces_start marks the word
// with sample 0 of a CES/PCES (1280 samples, 160 words) in lane 0; payload
// marks payload words. The estimate is ready (est_valid) about 180 cycles
// after ces_start; eq_out follows the payload word by 3 cycles,
// demap_bits the selected source by one more cycle.
// The block structure, widths at the block boundaries and the 8-fold
// parallelism follow the source design; the field-timing inputs and the
// demapper's output register are this design's.
module golay_mpic_tde
  import tde_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mode_ofdm,
  input  logic                 ces_start,
  input  logic                 payload,
  input  cpx_in_t              r          [N_LANES],
  output cpx_out_t             eq_out     [N_LANES],
  output logic                 eq_valid,
  input  cpx_out_t             fft_out    [N_LANES],
  input  logic                 fft_valid,
  output logic [2*N_LANES-1:0] demap_bits,
  output logic                 demap_valid,
  output cpx_h_t               h0,
  output cpx_h_t               ht,
  output logic [TAU_W-1:0]     tau,
  output logic                 tau_ok,
  output logic [IDX_W-1:0]     main_idx,
  output logic                 est_valid,
  output logic                 ogc_active
);
  logic                    ogc_en, cmp_start, est_done, eq_load, eq_in_valid, coef_valid;
  logic                    estimating;
  logic signed [OGC_W-1:0] y_re [N_LANES], y_im [N_LANES];
  cpx_out_t                derot [N_LANES];
  cpx_out_t                dm_in [N_LANES];
  logic                    dm_in_valid;

  tde_ctrl u_ctrl (
    .clk, .rst_n, .ces_start, .payload, .est_done, .coef_valid,
    .ogc_en, .cmp_start, .eq_load, .eq_in_valid, .est_valid, .estimating
  );

  ogc_correlator u_ogc (
    .clk, .rst_n, .en(ogc_en), .r, .y_re, .y_im
  );

  cir_peak_search u_cmp (
    .clk, .rst_n, .start(cmp_start), .y_re, .y_im,
    .h0, .ht, .tau, .tau_ok, .main_idx, .done(est_done)
  );

  mpic_equalizer u_eq (
    .clk, .rst_n, .load(eq_load), .h0, .ht, .tau, .tau_ok,
    .in_valid(eq_in_valid), .r, .x(eq_out), .out_valid(eq_valid), .coef_valid
  );

  pi2_derotator u_derot (.d(eq_out), .q(derot));

  // S/O selection in front of the demapper
  always_comb begin
    dm_in       = mode_ofdm ? fft_out : derot;
    dm_in_valid = mode_ofdm ? fft_valid : eq_valid;
  end

  qpsk_demapper u_demap (
    .clk, .rst_n, .in_valid(dm_in_valid), .d(dm_in),
    .bits(demap_bits), .out_valid(demap_valid)
  );

  assign ogc_active = estimating;
endmodule
