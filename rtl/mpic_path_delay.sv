// mpic_path_delay: the equalizer's configurable "2nd path delay".
//
// Delays an 8-lane stream by tau samples, 1 <= tau <= LANES*WORDS. A delay
// line of WORDS words (17 as in the source design, enough for the largest
// delay of 128 samples set by the post zero-correlation zone) holds the past
// samples; together with the current word they form a window of
// LANES*(WORDS+1) samples, and a selector per lane picks sample n - tau.
// The delay line shifts when en is high; the selection is combinational, so
// q belongs to the same cycle as d.
module mpic_path_delay
  import tde_pkg::*;
#(
  parameter int LANES = tde_pkg::N_LANES,
  parameter int WORDS = 17,
  parameter int W     = tde_pkg::RH_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [TAU_W-1:0]     tau,
  input  logic signed [W-1:0]  d_re [LANES],
  input  logic signed [W-1:0]  d_im [LANES],
  output logic signed [W-1:0]  q_re [LANES],
  output logic signed [W-1:0]  q_im [LANES]
);
  localparam int HIST = LANES * (WORDS + 1);   // samples visible to the selectors

  logic signed [W-1:0] line_re [WORDS][LANES];  // [0] is the previous word
  logic signed [W-1:0] line_im [WORDS][LANES];
  logic signed [W-1:0] win_re [HIST];           // time-ordered window, oldest first
  logic signed [W-1:0] win_im [HIST];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < WORDS; k++)
        for (int j = 0; j < LANES; j++) begin
          line_re[k][j] <= '0;
          line_im[k][j] <= '0;
        end
    end else if (en) begin
      line_re[0] <= d_re;
      line_im[0] <= d_im;
      for (int k = 1; k < WORDS; k++) begin
        line_re[k] <= line_re[k-1];
        line_im[k] <= line_im[k-1];
      end
    end
  end

  // Flat window in time order: win[HIST-LANES + j] is lane j of the current
  // word, win[HIST-LANES*(k+2) + j] is lane j of line[k].
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      win_re[HIST-LANES+j] = d_re[j];
      win_im[HIST-LANES+j] = d_im[j];
      for (int k = 0; k < WORDS; k++) begin
        win_re[HIST-LANES*(k+2)+j] = line_re[k][j];
        win_im[HIST-LANES*(k+2)+j] = line_im[k][j];
      end
    end
    for (int j = 0; j < LANES; j++) begin
      int sel;
      sel = HIST - LANES + j - int'(tau);
      if (sel < 0) sel = 0;
      q_re[j] = win_re[sel];
      q_im[j] = win_im[sel];
    end
  end
endmodule
