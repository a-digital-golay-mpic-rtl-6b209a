// ogc_correlator: 8X-parallel optimized Golay correlator (OGC) for channel
// estimation.
//
// The received word r (8 samples) and the same lanes delayed by 256 samples
// (the memory-bank FIFO, 32 words) enter a chain of 8 OGC stages with lower
// path delays of 128, 64, 32, 16, 8, 4, 2 and 1 samples (stages 7 down to
// 0); a final adder per lane sums the upper and lower outputs. The chain is
// a 512-tap matched filter whose taps are +/-1: it correlates the input with
// a_256 followed by b_256, so on the CES each output is
// alpha-hat[i] + beta-hat[i] of the source design, 2N = 512 times the channel
// tap. Widths grow by one bit per stage (9-bit input, 17-bit stage-0
// outputs, 18-bit result), as in the source design.
//
// The stage weights W_N (+/-1) define the Golay pair; the standard's weight
// vector is not reproduced here, W_VEC (bit s = 1 means +1 for stage s) is a
// parameter and every choice gives a valid complementary pair.
//
// Timing: one register per stage and one after the final adder, so y
// belongs to the input word OGC_LAT = 9 enabled cycles earlier. en low
// freezes the whole correlator and leaves the FIFO memories idle.
module ogc_correlator
  import tde_pkg::*;
#(
  parameter int         LANES = tde_pkg::N_LANES,
  parameter logic [7:0] W_VEC = 8'b1011_0100
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  cpx_in_t                 r    [LANES],
  output logic signed [OGC_W-1:0] y_re [LANES],
  output logic signed [OGC_W-1:0] y_im [LANES]
);
  localparam int WW = LANES * 2 * SAMPLE_W;   // 144-bit memory word

  logic [WW-1:0] fifo_in, fifo_out;

  // per-stage upper (p) and lower (q) inputs; index 0 feeds stage 7
  logic signed [OGC_W-1:0] p_re [9][LANES], p_im [9][LANES];
  logic signed [OGC_W-1:0] q_re [9][LANES], q_im [9][LANES];

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      fifo_in[j*2*SAMPLE_W +: 2*SAMPLE_W] = r[j];
      p_re[0][j] = OGC_W'(r[j].re);
      p_im[0][j] = OGC_W'(r[j].im);
      q_re[0][j] = OGC_W'($signed(fifo_out[j*2*SAMPLE_W+SAMPLE_W +: SAMPLE_W]));
      q_im[0][j] = OGC_W'($signed(fifo_out[j*2*SAMPLE_W +: SAMPLE_W]));
    end
  end

  ogc_mem_fifo #(.WORD_W(WW), .DEPTH(256 / LANES)) u_fifo (
    .clk, .rst_n, .en, .din(fifo_in), .dout(fifo_out)
  );

  for (genvar k = 0; k < 8; k++) begin : g_stage
    localparam int S = 7 - k;                 // stage number, delay 2^S
    ogc_stage #(
      .LANES(LANES), .D(1 << S), .WGT(W_VEC[S] ? 1 : -1),
      .IW(SAMPLE_W + k), .XW(OGC_W)
    ) u_stage (
      .clk, .rst_n, .en,
      .p_re(p_re[k]), .p_im(p_im[k]), .q_re(q_re[k]), .q_im(q_im[k]),
      .t_re(p_re[k+1]), .t_im(p_im[k+1]), .s_re(q_re[k+1]), .s_im(q_im[k+1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < LANES; j++) begin
        y_re[j] <= '0;
        y_im[j] <= '0;
      end
    end else if (en) begin
      for (int j = 0; j < LANES; j++) begin
        y_re[j] <= p_re[8][j] + q_re[8][j];
        y_im[j] <= p_im[8][j] + q_im[8][j];
      end
    end
  end
endmodule
