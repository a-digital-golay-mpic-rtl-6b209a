// tb_ogc_correlator: self-checking test of the 8X-parallel Golay
// correlator.
// The reference builds the 512 filter taps from the Golay recursion on
// whole sequences (a_{k+1} = w(b_k - a_k), b_{k+1} = (a_k + b_k) shifted by
// D, starting from 1 and z^-256), checks that they are +/-1 and that the
// two halves form a complementary pair (autocorrelations summing to a
// single peak of 2N at lag 0), and compares every correlator output with a
// direct 512-tap convolution of the random input stream. The enable is
// gated randomly; outputs are checked 9 enabled cycles after their input
// word. Finally a cyclically extended CES (1280 samples) must give the
// peak 512 at output index 639 and zero within 128 outputs on either side.
module tb_ogc_correlator;
  import tde_pkg::*;
  localparam int L = 8;
  localparam logic [7:0] WV = 8'b1011_0100;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, en = 0;
  cpx_in_t r [L];
  logic signed [OGC_W-1:0] y_re [L], y_im [L];

  ogc_correlator #(.LANES(L), .W_VEC(WV)) dut (.*);

  int g [512];
  int xr [$], xi [$];

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic build_taps();
    int p [512], q [512], np [512], nq [512];
    for (int n = 0; n < 512; n++) begin p[n] = 0; q[n] = 0; end
    p[0] = 1; q[256] = 1;
    for (int s = 7; s >= 0; s--) begin
      int d, w;
      d = 1 << s;
      w = WV[s] ? 1 : -1;
      for (int n = 0; n < 512; n++) begin
        np[n] = w * (q[n] - p[n]);
        nq[n] = (n >= d) ? p[n-d] + q[n-d] : 0;
      end
      p = np; q = nq;
    end
    for (int n = 0; n < 512; n++) g[n] = p[n] + q[n];
  endtask

  // word number k (counted over enabled cycles) entered; y now shows word k-8
  task automatic push_and_check(input int k);
    int n0;
    n0 = (k - 8) * L;
    if (n0 - 511 < 0) return;
    for (int j = 0; j < L; j++) begin
      int er, ei;
      er = 0; ei = 0;
      for (int t = 0; t < 512; t++) begin
        er += g[t] * xr[n0+j-t];
        ei += g[t] * xi[n0+j-t];
      end
      chk(y_re[j], er, "y_re");
      chk(y_im[j], ei, "y_im");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    build_taps();
    // taps are +/-1, halves complementary
    for (int n = 0; n < 512; n++) chk((g[n] == 1 || g[n] == -1) ? 1 : 0, 1, "tap +/-1");
    for (int lag = 0; lag < 256; lag++) begin
      int ra, rb;
      ra = 0; rb = 0;
      for (int n = 0; n + lag < 256; n++) begin
        ra += g[n+lag] * g[n];
        rb += g[256+n+lag] * g[256+n];
      end
      chk(ra + rb, (lag == 0) ? 512 : 0, "complementary");
    end
    for (int j = 0; j < L; j++) r[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = 0;
    for (int c = 0; c < 400; c++) begin
      en = ($urandom_range(5) != 0);
      for (int j = 0; j < L; j++) begin
        r[j].re = SAMPLE_W'($urandom);
        r[j].im = SAMPLE_W'($urandom);
      end
      @(posedge clk);
      if (en) begin
        for (int j = 0; j < L; j++) begin xr.push_back(int'(r[j].re)); xi.push_back(int'(r[j].im)); end
      end
      @(negedge clk);
      if (en) begin
        push_and_check(k);
        k++;
      end
    end
    // CES: cyclic extension of the sequence matched by the filter, c[n] = g[511-n]
    en = 1;
    for (int w = 0; w < 160 + 8; w++) begin
      for (int j = 0; j < L; j++) begin
        int n, v;
        n = w * L + j;
        v = (n < 1280) ? 100 * g[511 - ((n - 128 + 512) % 512)] : 0;
        r[j].re = SAMPLE_W'(v);
        r[j].im = SAMPLE_W'(-v / 2);
      end
      @(negedge clk);
      if (w >= 8) begin
        for (int j = 0; j < L; j++) begin
          int n;
          n = (w - 8) * L + j;
          if (n >= 511 && n < 767) begin
            chk(y_re[j], (n == 639) ? 51200 : 0, "CES peak re");
            chk(y_im[j], (n == 639) ? -25600 : 0, "CES peak im");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
