// qpsk_demapper: hard-decision demapper for pi/2-QPSK (SC, after
// de-rotation) and QPSK (OFDM), 2 bits per lane, 16 bits per word, with
// the output register of the equalizer's result path.
//
// Each lane is sliced against the QPSK decision boundaries (the real and
// imaginary axes): bits[2j] is 1 when the real part of lane j is negative,
// bits[2j+1] when its imaginary part is negative (this design's bit
// convention; the source design only states the 2 x 8 output bits).
// Timing: a word with in_valid is decided and registered, bits and
// out_valid appear one cycle later; bits hold between valid words.
module qpsk_demapper
  import tde_pkg::*;
#(
  parameter int LANES = tde_pkg::N_LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cpx_out_t           d [LANES],
  output logic [2*LANES-1:0] bits,
  output logic               out_valid
);
  logic [2*LANES-1:0] dec;

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      dec[2*j]   = d[j].re < 0;
      dec[2*j+1] = d[j].im < 0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= dec;
    end
  end
endmodule
