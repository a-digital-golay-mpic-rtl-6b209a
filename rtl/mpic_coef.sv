// mpic_coef: the equalizer's common terms, computed once per channel
// estimate by a single (not 8-fold) hardware.
//
//   c = conj(h0) * LUT(|h0|^2)          ~ 2^24 * conj(h0)/|h0|^2 = 2^24/h0
//   m = (c * h[tau]) >> 12              ~ 4096 * h[tau]/h0      (Q3.12)
//
// so that the 8 lanes of the equalizer only need r-hat = r*c and
// x = r-hat[n] - r-hat[n-tau]*m. |h0|^2 of the 9-bit tap is saturated to
// the 15-bit LUT input. When tau_ok is low (no usable second path) m is 0.
// tau is carried along and published (tau_o) together with c and m.
//
// Timing: load starts the 4-stage pipeline (power, LUT, c, m); c and m
// switch to the new values together and valid pulses 5 cycles after load,
// the first cycle they hold them; they stay until the next load, so the
// equalizer never mixes old and new terms. The
// arithmetic order follows the source design's parallel equalizer; widths
// other than the 15-bit LUT input and 13-bit LUT output are this design's.
module mpic_coef
  import tde_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  cpx_h_t                h0,
  input  cpx_h_t                ht,
  input  logic                  tau_ok,
  input  logic [TAU_W-1:0]      tau,
  output logic signed [C_W-1:0] c_re,
  output logic signed [C_W-1:0] c_im,
  output logic signed [M_W-1:0] m_re,
  output logic signed [M_W-1:0] m_im,
  output logic [TAU_W-1:0]      tau_o,
  output logic                  valid
);
  logic [3:0]          vld;                 // pipeline valid bits
  logic [14:0]         pwr;
  logic [12:0]         inv, inv_q;
  localparam int P_W = 2 * H_W;
  logic [P_W-1:0]      pwr_full;
  cpx_h_t              h0_q, ht_q;
  logic                tok_q;
  logic [TAU_W-1:0]    tau_q;
  logic signed [C_W-1:0] cn_re, cn_im;      // new common term, published with m

  assign pwr_full = P_W'($signed(h0_q.re) * $signed(h0_q.re) + $signed(h0_q.im) * $signed(h0_q.im));

  inv_lut u_lut (.p(pwr), .inv(inv));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0; valid <= 1'b0; pwr <= '0; inv_q <= '0; h0_q <= '0; ht_q <= '0; tok_q <= 1'b0;
      tau_q <= TAU_W'(1); tau_o <= TAU_W'(1);
      c_re <= '0; c_im <= '0; m_re <= '0; m_im <= '0; cn_re <= '0; cn_im <= '0;
    end else begin
      vld   <= {vld[2:0], load};
      valid <= vld[3];
      if (load) begin
        h0_q  <= h0;
        ht_q  <= ht;
        tok_q <= tau_ok;
        tau_q <= tau;
      end
      // stage 1: |h0|^2 saturated to 15 bits
      if (vld[0]) pwr <= (pwr_full > 18'd32767) ? 15'h7fff : pwr_full[14:0];
      // stage 2: reciprocal
      if (vld[1]) inv_q <= inv;
      // stage 3: c = conj(h0) * inv
      if (vld[2]) begin
        cn_re <= C_W'($signed(h0_q.re) * $signed({1'b0, inv_q}));
        cn_im <= C_W'(0) - C_W'($signed(h0_q.im) * $signed({1'b0, inv_q}));
      end
      // stage 4: m = c * h[tau] >> FRAC; c and m change in the same cycle
      if (vld[3]) begin
        c_re  <= cn_re;
        c_im  <= cn_im;
        tau_o <= tau_q;
        if (tok_q) begin
          m_re <= sat16_shr(48'(cn_re * ht_q.re - cn_im * ht_q.im));
          m_im <= sat16_shr(48'(cn_re * ht_q.im + cn_im * ht_q.re));
        end else begin
          m_re <= '0;
          m_im <= '0;
        end
      end
    end
  end

endmodule
