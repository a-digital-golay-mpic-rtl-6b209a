// tb_inv_lut: self-checking test of the reciprocal table.
// Sweeps every 15-bit power p. Where 2^24/p fits in 13 bits the output must
// be within 1/32 (the table's resolution) of 2^24/p, computed here in real
// arithmetic; where it does not the output must be saturated at 8191.
// Also checks that the output never increases with p.
module tb_inv_lut;
  int checks = 0, failures = 0;
  logic [14:0] p;
  logic [12:0] inv;
  logic clk = 0;
  always #5 clk = ~clk;

  inv_lut dut (.p, .inv);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    prev = 8191;
    for (int v = 1; v < 32768; v++) begin
      real ex, err;
      p = 15'(v);
      #1;
      ex = 16777216.0 / v;
      checks++;
      if (ex >= 8191.0 * 1.04) begin
        if (inv != 13'd8191) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d inv=%0d not saturated", v, inv);
        end
      end else if (ex < 8191.0) begin
        err = (real'(inv) - ex) / ex;
        if (err > 0.032 || err < -0.032) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d inv=%0d exp %f", v, inv, ex);
        end
      end
      checks++;
      if (int'(inv) > prev) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d not monotonic", v);
      end
      prev = int'(inv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
