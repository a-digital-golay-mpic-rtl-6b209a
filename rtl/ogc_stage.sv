// ogc_stage: one stage of the 8X-parallel optimized Golay correlator (OGC).
//
// For every lane the stage forms the difference q-p, weighted by WGT (+1 is
// a bypass, -1 an inverter, as the weights of a binary Golay sequence are
// +/-1), on the upper path, and the sum p+q delayed by D samples on the
// lower path. Both results are registered once, so the stage has one cycle
// of latency on both paths and the D-sample offset between them is kept.
//
// The D-sample delay on an 8-sample word follows the source design's
// parallel structure: for D >= LANES it is a shift register of D/LANES words
// on every lane; for D < LANES it is wiring, lane j taking the sum of lane
// j-D of the same word, and the last D lanes keeping a one-word register
// whose output feeds lanes 0..D-1 ("OU R" and "OU S" units).
//
// Inputs are expected to fit in IW bits, outputs fit in IW+1 bits; the
// registers are sized to that and the ports are sign-extended to XW bits.
// en is a clock enable that freezes the stage (correlator shut-down).
module ogc_stage #(
  parameter int LANES = 8,
  parameter int D     = 128,
  parameter int WGT   = 1,
  parameter int IW    = 9,
  parameter int XW    = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] p_re [LANES],
  input  logic signed [XW-1:0] p_im [LANES],
  input  logic signed [XW-1:0] q_re [LANES],
  input  logic signed [XW-1:0] q_im [LANES],
  output logic signed [XW-1:0] t_re [LANES],
  output logic signed [XW-1:0] t_im [LANES],
  output logic signed [XW-1:0] s_re [LANES],
  output logic signed [XW-1:0] s_im [LANES]
);
  localparam int OW = IW + 1;

  logic signed [OW-1:0] dif_re [LANES], dif_im [LANES];
  logic signed [OW-1:0] sum_re [LANES], sum_im [LANES];
  logic signed [OW-1:0] dly_re [LANES], dly_im [LANES];   // sum delayed D samples
  logic signed [OW-1:0] tr_q [LANES], ti_q [LANES], sr_q [LANES], si_q [LANES];

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      dif_re[j] = OW'(q_re[j]) - OW'(p_re[j]);
      dif_im[j] = OW'(q_im[j]) - OW'(p_im[j]);
      sum_re[j] = OW'(p_re[j]) + OW'(q_re[j]);
      sum_im[j] = OW'(p_im[j]) + OW'(q_im[j]);
      if (WGT < 0) begin
        dif_re[j] = -dif_re[j];
        dif_im[j] = -dif_im[j];
      end
    end
  end

  if (D >= LANES) begin : g_word_delay
    localparam int K = D / LANES;
    logic signed [OW-1:0] sh_re [K][LANES];
    logic signed [OW-1:0] sh_im [K][LANES];
    always_ff @(posedge clk) begin
      if (en) begin
        sh_re[0] <= sum_re;
        sh_im[0] <= sum_im;
        for (int k = 1; k < K; k++) begin
          sh_re[k] <= sh_re[k-1];
          sh_im[k] <= sh_im[k-1];
        end
      end
    end
    assign dly_re = sh_re[K-1];
    assign dly_im = sh_im[K-1];
  end else begin : g_lane_route
    logic signed [OW-1:0] prev_re [LANES];   // only lanes LANES-D.. are used
    logic signed [OW-1:0] prev_im [LANES];
    always_ff @(posedge clk) begin
      if (en) begin
        prev_re <= sum_re;
        prev_im <= sum_im;
      end
    end
    always_comb begin
      for (int j = 0; j < LANES; j++) begin
        if (j >= D) begin
          dly_re[j] = sum_re[j-D];
          dly_im[j] = sum_im[j-D];
        end else begin
          dly_re[j] = prev_re[j+LANES-D];
          dly_im[j] = prev_im[j+LANES-D];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < LANES; j++) begin
        tr_q[j] <= '0; ti_q[j] <= '0; sr_q[j] <= '0; si_q[j] <= '0;
      end
    end else if (en) begin
      tr_q <= dif_re;
      ti_q <= dif_im;
      sr_q <= dly_re;
      si_q <= dly_im;
    end
  end

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      t_re[j] = XW'(tr_q[j]);
      t_im[j] = XW'(ti_q[j]);
      s_re[j] = XW'(sr_q[j]);
      s_im[j] = XW'(si_q[j]);
    end
  end
endmodule
