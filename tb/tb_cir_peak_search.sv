// tb_cir_peak_search: self-checking test of the comparator / register h.
// Plays synthetic correlator outputs for a 1280-sample field: small random
// values, a main tap and a weaker second tap in the first repetition and
// slightly different ones 512 outputs later. Checks h0 and ht (sum of the
// two repetitions divided by 1024), tau, tau_ok, the main-peak index and
// that done comes 160 cycles after start. Cases cover cross-lane and
// multi-word tau, the largest tau of 128, a second tap ahead of the main
// one (tau_ok low) and a second tap beyond 128 (tau_ok low).
module tb_cir_peak_search;
  import tde_pkg::*;
  localparam int L = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0;
  logic signed [OGC_W-1:0] y_re [L], y_im [L];
  cpx_h_t h0, ht;
  logic [TAU_W-1:0] tau;
  logic tau_ok, done;
  logic [IDX_W-1:0] main_idx;

  cir_peak_search dut (.*);

  int yr [1280], yi [1280];

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_case(input int i1, input int i2, input int v1r, input int v1i,
                          input int v2r, input int v2i, input int exp_ok);
    int e1r, e1i, e2r, e2i, cyc, done_cyc;
    for (int n = 0; n < 1280; n++) begin
      yr[n] = $urandom_range(80) - 40;
      yi[n] = $urandom_range(80) - 40;
    end
    yr[i1] = v1r; yi[i1] = v1i; yr[i2] = v2r; yi[i2] = v2i;
    yr[i1+512] = v1r + 300; yi[i1+512] = v1i - 200;
    yr[i2+512] = v2r - 100; yi[i2+512] = v2i + 60;
    e1r = (2*v1r + 300) >>> 10; e1i = (2*v1i - 200) >>> 10;
    e2r = (2*v2r - 100) >>> 10; e2i = (2*v2i + 60) >>> 10;
    done_cyc = -1;
    for (int w = 0; w < 165; w++) begin
      start = (w == 0);
      for (int j = 0; j < L; j++) begin
        int n;
        n = w * L + j;
        y_re[j] = (n < 1280) ? OGC_W'(yr[n]) : '0;
        y_im[j] = (n < 1280) ? OGC_W'(yi[n]) : '0;
      end
      #1;
      if (done && done_cyc < 0) done_cyc = w;
      @(negedge clk);
    end
    start = 0;
    chk(done_cyc, 160, "done latency (cycles after start)");
    chk(h0.re, e1r, "h0.re"); chk(h0.im, e1i, "h0.im");
    chk(main_idx, i1, "main_idx");
    chk(tau_ok, exp_ok, "tau_ok");
    if (exp_ok) begin
      chk(ht.re, e2r, "ht.re"); chk(ht.im, e2i, "ht.im");
      chk(tau, i2 - i1, "tau");
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < L; j++) begin y_re[j] = '0; y_im[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_case(639, 642, 51200, -20000, 9000, 7000, 1);     // tau 3, inside a word
    run_case(639, 660, 40000, 30000, -12000, 5000, 1);    // tau 21, across words
    run_case(600, 728, -60000, 1000, 3000, -15000, 1);    // tau 128, the largest
    run_case(700, 650, 45000, 45000, 20000, 0, 0);        // second tap ahead
    run_case(520, 760, 50000, 0, 20000, 0, 0);            // tau 240 > 128
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
