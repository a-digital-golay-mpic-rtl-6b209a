// inv_lut: reduced-resolution reciprocal table for the equalizer's real
// division by |h0|^2.
//
// inv ~= 2^INV_SHIFT / p for a 15-bit power p, as a 13-bit unsigned number
// saturated at 2^13-1 (reached for p below about 2^INV_SHIFT/8191 = 2049).
// The table is addressed by the position e of the leading one of p and the
// MANT_BITS bits below it, so p is represented to about 1/32 of its value
// and the table has 15 x 32 entries instead of 2^15. Each entry is the
// rounded reciprocal of the midpoint of its interval; below 2^MANT_BITS the
// power is used exactly. The table is computed at elaboration from that
// formula. Purely combinational.
//
// The source design gives the 15-bit input, the 13-bit output and the idea
// of a table of reduced resolution; the scale and the addressing are this
// design's choices.
module inv_lut #(
  parameter int IN_W      = 15,
  parameter int OUT_W     = 13,
  parameter int INV_SHIFT = 24,
  parameter int MANT_BITS = 5
) (
  input  logic [IN_W-1:0]  p,
  output logic [OUT_W-1:0] inv
);
  localparam int EW      = $clog2(IN_W);
  localparam int ENTRIES = IN_W << MANT_BITS;

  typedef logic [OUT_W-1:0] table_t [ENTRIES];

  function automatic table_t build_table();
    table_t t;
    for (int e = 0; e < IN_W; e++) begin
      for (int m = 0; m < (1 << MANT_BITS); m++) begin
        longint num, den, q;
        if (e < MANT_BITS) begin
          den = longint'(2) * ((longint'(1) << e) + (longint'(m) >> (MANT_BITS - e)));  // exact p, doubled
        end else begin
          den = ((longint'(2) * ((longint'(1) << MANT_BITS) + longint'(m)) + 1)) << (e - MANT_BITS);  // midpoint, doubled
        end
        num = longint'(1) << (INV_SHIFT + 1);
        q   = (num + den / 2) / den;
        if (q > (longint'(1) << OUT_W) - 1) q = (longint'(1) << OUT_W) - 1;
        t[(e << MANT_BITS) + m] = OUT_W'(q);
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [EW-1:0]        e;
  logic [MANT_BITS-1:0] mant;
  logic [IN_W+MANT_BITS-1:0] pn;             // only the MANT_BITS bits under the leading one are used

  always_comb begin
    e = '0;
    for (int b = 0; b < IN_W; b++) if (p[b]) e = EW'(b);
    pn   = {p, {MANT_BITS{1'b0}}} >> e;        // leading one at bit MANT_BITS
    mant = pn[MANT_BITS-1:0];
    if (p == '0) inv = '1;
    else         inv = TABLE[(int'(e) << MANT_BITS) + int'(mant)];
  end
endmodule
