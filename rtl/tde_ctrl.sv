// tde_ctrl: field sequencing of the equalizer.
//
// Follows the source design's flow: on a CES or PCES field run the Golay
// channel estimation; on payload equalize; otherwise sleep. ces_start (the
// word carrying the first CES/PCES sample in lane 0) switches the correlator
// and its memory FIFO on (ogc_en) and, OGC_LAT cycles later when that word
// leaves the correlator, starts the peak search (cmp_start). When the
// search reports est_done the correlator is shut down again, the memory is
// released, and the new taps are loaded into the equalizer (eq_load); once
// its coefficients are valid, payload words are passed to it (eq_in_valid).
// Payload words that arrive before the first estimate of a frame is ready
// (est_valid) are not equalized; during a PCES re-estimation payload keeps
// being equalized with the previous estimate until the new one is loaded.
// The first estimate is usable 175 cycles after ces_start, i.e. 15 words after
// the CES ends. The state encoding, the reset state (SLEEP, no estimate)
// and the reuse of the old estimate are this design's choices. eq_load is
// est_done itself: the taps are loaded in the cycle the search ends.
module tde_ctrl
  import tde_pkg::*;
#(
  parameter int LAT = tde_pkg::OGC_LAT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ces_start,
  input  logic payload,
  input  logic est_done,
  input  logic coef_valid,
  output logic ogc_en,
  output logic cmp_start,
  output logic eq_load,
  output logic eq_in_valid,
  output logic est_valid,
  output logic estimating
);
  typedef enum logic [1:0] {SLEEP, ESTIMATE, LOAD, EQUALIZE} state_t;

  state_t         state;
  logic [LAT-1:0] start_dly;
  logic           have_est;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= SLEEP;
      start_dly <= '0;
      have_est  <= 1'b0;
    end else begin
      if (coef_valid) have_est <= 1'b1;
      start_dly <= {start_dly[LAT-2:0], ces_start};
      unique case (state)
        SLEEP, EQUALIZE: if (ces_start) state <= ESTIMATE;
        ESTIMATE:        if (est_done)  state <= LOAD;
        LOAD:            if (coef_valid) state <= EQUALIZE;
        default:         state <= SLEEP;
      endcase
    end
  end

  assign ogc_en      = ces_start || (state == ESTIMATE);
  assign cmp_start   = start_dly[LAT-1];
  assign eq_load     = est_done;
  assign est_valid   = have_est;
  assign estimating  = (state == ESTIMATE);
  assign eq_in_valid = payload && have_est;

  a_done_only_when_estimating: assert property (@(posedge clk) disable iff (!rst_n)
                                                est_done |-> state == ESTIMATE);
endmodule
