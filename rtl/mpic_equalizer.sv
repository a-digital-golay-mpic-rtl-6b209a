// mpic_equalizer: one-tap multi-path interference cancellation (MPIC) on 8
// lanes.
//
// With a two-path channel r[i] = h0 x[i] + h[tau] x[i-tau], each sample is
// first scaled by the common term, r-hat = r * conj(h0)/|h0|^2, and the
// second-path replica is then subtracted,
//   x[i] = r-hat[i] - r-hat[i-tau] * h[tau] conj(h0)/|h0|^2,
// which leaves x[i] minus a residue of order (h[tau]/h0)^2. The common terms
// come from mpic_coef (one instance), the tau delay from mpic_path_delay;
// the 8 lanes each have the two complex multipliers and the subtractor.
//
// Fixed point: r is 9-bit, r-hat and m are Q3.12 in 16 bits, x is Q2.12
// in 15 bits (a unit symbol becomes 4096), saturating. The 9-bit input,
// 13-bit reciprocal and 15-bit output follow the source design; the Q
// formats are this design's.
//
// Timing: load (new h0, ht, tau) updates the coefficients after 5 cycles
// (coef_valid); payload words with in_valid come out 3 cycles later with
// out_valid, one word per cycle. The delay line advances on valid words
// only, so tau counts payload samples.
module mpic_equalizer
  import tde_pkg::*;
#(
  parameter int LANES = tde_pkg::N_LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  cpx_h_t           h0,
  input  cpx_h_t           ht,
  input  logic [TAU_W-1:0] tau,
  input  logic             tau_ok,
  input  logic             in_valid,
  input  cpx_in_t          r [LANES],
  output cpx_out_t         x [LANES],
  output logic             out_valid,
  output logic             coef_valid
);
  logic signed [C_W-1:0]  c_re, c_im;
  logic signed [M_W-1:0]  m_re, m_im;
  logic [TAU_W-1:0]       tau_q;
  logic signed [RH_W-1:0] rh_re [LANES], rh_im [LANES];     // stage 1
  logic signed [RH_W-1:0] rd_re [LANES], rd_im [LANES];     // rh delayed by tau
  logic signed [RH_W-1:0] rh2_re [LANES], rh2_im [LANES];   // stage 2
  logic signed [RH_W-1:0] pr_re [LANES], pr_im [LANES];
  logic                   v1, v2;

  mpic_coef u_coef (
    .clk, .rst_n, .load, .h0, .ht, .tau_ok, .tau,
    .c_re, .c_im, .m_re, .m_im, .tau_o(tau_q), .valid(coef_valid)
  );

  mpic_path_delay #(.LANES(LANES), .W(RH_W)) u_delay (
    .clk, .rst_n, .en(v1), .tau(tau_q),
    .d_re(rh_re), .d_im(rh_im), .q_re(rd_re), .q_im(rd_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int j = 0; j < LANES; j++) begin
        rh_re[j] <= '0; rh_im[j] <= '0; rh2_re[j] <= '0; rh2_im[j] <= '0;
        pr_re[j] <= '0; pr_im[j] <= '0; x[j] <= '0;
      end
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
      for (int j = 0; j < LANES; j++) begin
        // stage 1: r-hat = r * c
        if (in_valid) begin
          rh_re[j] <= sat16_shr(48'(r[j].re * c_re - r[j].im * c_im));
          rh_im[j] <= sat16_shr(48'(r[j].re * c_im + r[j].im * c_re));
        end
        // stage 2: second-path replica r-hat[i-tau] * m
        if (v1) begin
          rh2_re[j] <= rh_re[j];
          rh2_im[j] <= rh_im[j];
          pr_re[j]  <= sat16_shr(48'(rd_re[j] * m_re - rd_im[j] * m_im));
          pr_im[j]  <= sat16_shr(48'(rd_re[j] * m_im + rd_im[j] * m_re));
        end
        // stage 3: cancellation
        if (v2) begin
          x[j].re <= sat_out(48'(rh2_re[j]) - 48'(pr_re[j]));
          x[j].im <= sat_out(48'(rh2_im[j]) - 48'(pr_im[j]));
        end
      end
    end
  end
endmodule
