// cir_peak_search: comparator and channel register "h" of the estimator.
//
// It watches the correlator output of one CES/PCES field. start marks the
// output word whose lane 0 is correlator output index 0 (the first CES
// sample); lane j of each following word is index 8m+j. In the first
// repetition window, WIN_LEN outputs from WIN_START (the main peak of an
// undelayed path sits 128 outputs into it, the two 128-sample
// zero-correlation zones around it), the two taps of largest magnitude
// |re|+|im| are kept with their indexes. REP_DIST outputs later the same two
// offsets of the second repetition are added, which is the two-repetition
// average of the channel estimate; the sums, divided by 4N = 2^H_SHIFT, are
// the 9-bit taps h0 (main path) and ht (second path). tau is the index
// distance of the second path behind the main one; tau_ok is low when the
// second tap is not a post-cursor within 1..TAU_MAX, and the equalizer then
// cancels nothing. main_idx is the main-peak index, i.e. the fine frame
// boundary. All outputs change only with the done pulse, one cycle after
// the last output of the second window.
//
// The source design names the comparator and register h and says what they
// keep; the magnitude measure, the tie rule (the earlier index wins) and the
// handling of pre-cursors are this design's choices.
module cir_peak_search
  import tde_pkg::*;
#(
  parameter int LANES     = tde_pkg::N_LANES,
  parameter int WIN_START = 511,
  parameter int WIN_LEN   = 256,
  parameter int REP_DIST  = 512,
  parameter int TAU_MAX   = 128,
  parameter int H_SHIFT   = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [OGC_W-1:0] y_re [LANES],
  input  logic signed [OGC_W-1:0] y_im [LANES],
  output cpx_h_t                  h0,
  output cpx_h_t                  ht,
  output logic [TAU_W-1:0]        tau,
  output logic                    tau_ok,
  output logic [IDX_W-1:0]        main_idx,
  output logic                    done
);
  localparam int MAG_W = OGC_W + 1;
  localparam int ACC_W = OGC_W + 1;
  localparam int LAST  = WIN_START + REP_DIST + WIN_LEN - 1;

  logic                    active;
  logic [IDX_W-1:0]        base;                     // index of lane 0
  logic [MAG_W-1:0]        m1, m2, m1_n, m2_n;       // best and second magnitudes
  logic [IDX_W-1:0]        i1, i2, i1_n, i2_n;
  logic signed [ACC_W-1:0] a1r, a1i, a2r, a2i;       // tap sums
  logic signed [ACC_W-1:0] a1r_n, a1i_n, a2r_n, a2i_n;
  logic                    last_word;

  function automatic logic [MAG_W-1:0] mag(input logic signed [OGC_W-1:0] re,
                                           input logic signed [OGC_W-1:0] im);
    logic [MAG_W-1:0] ar, ai;
    ar = re[OGC_W-1] ? MAG_W'(-re) : MAG_W'(re);
    ai = im[OGC_W-1] ? MAG_W'(-im) : MAG_W'(im);
    return ar + ai;
  endfunction

  always_comb begin
    m1_n = m1; m2_n = m2; i1_n = i1; i2_n = i2;
    a1r_n = a1r; a1i_n = a1i; a2r_n = a2r; a2i_n = a2i;
    for (int j = 0; j < LANES; j++) begin
      logic [IDX_W-1:0] idx;
      logic [MAG_W-1:0] mj;
      idx = base + IDX_W'(j);
      mj  = mag(y_re[j], y_im[j]);
      if (idx >= IDX_W'(WIN_START) && idx < IDX_W'(WIN_START + WIN_LEN)) begin
        if (mj > m1_n) begin
          m2_n = m1_n; i2_n = i1_n; a2r_n = a1r_n; a2i_n = a1i_n;
          m1_n = mj;   i1_n = idx;  a1r_n = ACC_W'(y_re[j]); a1i_n = ACC_W'(y_im[j]);
        end else if (mj > m2_n) begin
          m2_n = mj;   i2_n = idx;  a2r_n = ACC_W'(y_re[j]); a2i_n = ACC_W'(y_im[j]);
        end
      end
      if (idx >= IDX_W'(WIN_START + WIN_LEN) && idx == i1 + IDX_W'(REP_DIST)) begin
        a1r_n = a1r + ACC_W'(y_re[j]);
        a1i_n = a1i + ACC_W'(y_im[j]);
      end
      if (idx >= IDX_W'(WIN_START + WIN_LEN) && idx == i2 + IDX_W'(REP_DIST)) begin
        a2r_n = a2r + ACC_W'(y_re[j]);
        a2i_n = a2i + ACC_W'(y_im[j]);
      end
    end
    last_word = (base + IDX_W'(LANES - 1)) >= IDX_W'(LAST);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0; base <= '0; done <= 1'b0;
      m1 <= '0; m2 <= '0; i1 <= '0; i2 <= '0;
      a1r <= '0; a1i <= '0; a2r <= '0; a2i <= '0;
      h0 <= '0; ht <= '0; tau <= '0; tau_ok <= 1'b0; main_idx <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // the word carrying index 0 is below WIN_START: only reset the search
        active <= 1'b1;
        base   <= IDX_W'(LANES);
        m1 <= '0; m2 <= '0; i1 <= '0; i2 <= '0;
      end else if (active) begin
        m1 <= m1_n; m2 <= m2_n; i1 <= i1_n; i2 <= i2_n;
        a1r <= a1r_n; a1i <= a1i_n; a2r <= a2r_n; a2i <= a2i_n;
        base <= base + IDX_W'(LANES);
        if (last_word) begin
          active   <= 1'b0;
          done     <= 1'b1;
          h0.re    <= H_W'(a1r_n >>> H_SHIFT);
          h0.im    <= H_W'(a1i_n >>> H_SHIFT);
          ht.re    <= H_W'(a2r_n >>> H_SHIFT);
          ht.im    <= H_W'(a2i_n >>> H_SHIFT);
          main_idx <= i1_n;
          tau      <= TAU_W'(i2_n - i1_n);
          tau_ok   <= (i2_n > i1_n) && (i2_n - i1_n <= IDX_W'(TAU_MAX));
        end
      end
    end
  end
endmodule
