// tb_tde_ctrl: self-checking test of the field sequencing.
// Checks: sleep after reset (correlator off, payload not equalized),
// correlator switched on in the ces_start cycle and kept on until
// est_done, cmp_start exactly 9 cycles after ces_start, eq_load with
// est_done, payload passed only once a first estimate is loaded, correlator
// off during payload, and a PCES re-estimation during which payload is
// still passed on with the previous estimate.
module tb_tde_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, ces_start = 0, payload = 0, est_done = 0, coef_valid = 0;
  logic ogc_en, cmp_start, eq_load, eq_in_valid, est_valid, estimating;

  tde_ctrl dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic estimate(input bit first);
    ces_start = 1;
    #1 chk(ogc_en, "ogc_en with ces_start");
    @(negedge clk);
    ces_start = 0;
    for (int c = 1; c <= 20; c++) begin
      #1;
      chk(cmp_start == (c == 9), "cmp_start 9 cycles after ces_start");
      chk(ogc_en && estimating && !eq_in_valid && est_valid == !first, "estimating");
      @(negedge clk);
    end
    est_done = 1;
    #1 chk(eq_load, "eq_load with est_done");
    @(negedge clk);
    est_done = 0;
    #1 chk(!ogc_en, "correlator off after estimation");
    payload = 1;
    // first estimate: nothing to equalize with yet; later: old estimate used
    repeat (3) begin #1 chk(eq_in_valid == !first, "payload before coef_valid"); @(negedge clk); end
    coef_valid = 1;
    @(negedge clk);
    coef_valid = 0;
    repeat (10) begin
      #1 chk(eq_in_valid && est_valid && !ogc_en, "equalizing");
      @(negedge clk);
    end
    payload = 0;
    #1 chk(!eq_in_valid, "no payload flag");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    payload = 1;
    repeat (4) begin #1 chk(!ogc_en && !eq_in_valid && !est_valid, "sleep"); @(negedge clk); end
    payload = 0;
    estimate(1);     // CES
    @(negedge clk);
    estimate(0);     // PCES
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
