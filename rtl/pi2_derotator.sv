// pi2_derotator: clockwise pi/2 phase shifter of the SC path.
//
// pi/2-M-PSK rotates symbol k by j^k at the transmitter; this block turns
// sample k back by (-j)^k. With 8 samples per word and a period of 4, lane
// j always gets the rotation (-j)^(j mod 4) provided the payload starts at
// lane 0 with k = 0 (this design's convention). The rotations are swaps and
// negations of re and im, saturating the one value, -2^14, whose negation
// does not fit. Purely combinational. Used in SC mode only. Lanes 0 and 4
// pass through unchanged, and in lanes 1, 3, 5 and 7 one of the two output
// parts is the other input part as is, so half of the output bits are
// plain wires.
module pi2_derotator
  import tde_pkg::*;
#(
  parameter int LANES = tde_pkg::N_LANES
) (
  input  cpx_out_t d [LANES],
  output cpx_out_t q [LANES]
);
  function automatic logic signed [OUT_W-1:0] neg(input logic signed [OUT_W-1:0] v);
    return (v == {1'b1, {(OUT_W-1){1'b0}}}) ? {1'b0, {(OUT_W-1){1'b1}}} : -v;
  endfunction

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      unique case (j % 4)
        0: begin q[j].re = d[j].re;      q[j].im = d[j].im;      end   // x 1
        1: begin q[j].re = d[j].im;      q[j].im = neg(d[j].re); end   // x -j
        2: begin q[j].re = neg(d[j].re); q[j].im = neg(d[j].im); end   // x -1
        default: begin q[j].re = neg(d[j].im); q[j].im = d[j].re; end  // x +j
      endcase
    end
  end
endmodule
