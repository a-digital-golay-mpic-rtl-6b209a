// tb_mpic_equalizer: self-checking test of the one-tap MPIC equalizer.
// Random QPSK symbols x in {+-1 +-j} pass a two-path channel
// r[i] = h0 x[i] + h[tau] x[i-tau] (integer taps, no noise). For several
// channels (tau inside a word, across words and 128) the output must match,
// within 5 % of a symbol, 4096 * (r[i] - (h[tau]/h0) r[i-tau]) / h0
// computed here in reals, must give the right QPSK decision for every
// sample, and must come 3 cycles after its input word; coef_valid must
// come 5 cycles after load. Random gaps in the input check that tau counts
// valid samples only.
module tb_mpic_equalizer;
  import tde_pkg::*;
  localparam int L = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, load = 0, tau_ok = 0, in_valid = 0, out_valid, coef_valid;
  cpx_h_t h0, ht;
  logic [TAU_W-1:0] tau;
  cpx_in_t  r [L];
  cpx_out_t x [L];

  mpic_equalizer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int h0r, input int h0i, input int htr, input int hti, input int t);
    int sr [$], si [$];           // symbols
    real rr [$], ri [$];          // received samples
    int exp_word [$];             // word number per input cycle, -1 for gap
    int lat, nin, nout;
    real den;
    h0.re = H_W'(h0r); h0.im = H_W'(h0i); ht.re = H_W'(htr); ht.im = H_W'(hti);
    tau = TAU_W'(t); tau_ok = 1;
    load = 1;
    @(negedge clk);
    load = 0;
    lat = 1;
    while (!coef_valid && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 5, "coef latency");
    den = real'(h0r*h0r + h0i*h0i);
    nin = 0; nout = 0;
    for (int c = 0; c < 200 + 4; c++) begin
      // drive
      in_valid = (c < 200) && ($urandom_range(6) != 0);
      for (int j = 0; j < L; j++) begin
        int a, b, n, pa, pb;
        a = $urandom_range(1) ? 1 : -1;
        b = $urandom_range(1) ? 1 : -1;
        n = sr.size();
        if (in_valid) begin
          sr.push_back(a); si.push_back(b);
          pa = (n - t >= 0) ? sr[n-t] : 0;
          pb = (n - t >= 0) ? si[n-t] : 0;
          rr.push_back(real'(h0r*a - h0i*b + htr*pa - hti*pb));
          ri.push_back(real'(h0r*b + h0i*a + htr*pb + hti*pa));
          r[j].re = SAMPLE_W'(int'(rr[n]));
          r[j].im = SAMPLE_W'(int'(ri[n]));
        end else begin
          r[j].re = SAMPLE_W'($urandom);
          r[j].im = SAMPLE_W'($urandom);
        end
      end
      exp_word.push_back(in_valid ? nin : -1);
      if (in_valid) nin++;
      @(negedge clk);
      // after this edge, out_valid/x belong to the input of cycle c-2
      if (c >= 2) begin
        chk(out_valid == (exp_word[c-2] >= 0), "out_valid 3 cycles after input");
        if (out_valid && exp_word[c-2] >= 0) begin
          int w;
          w = exp_word[c-2];
          for (int j = 0; j < L; j++) begin
            int n;
            real ar, ai, br, bi, qr, qi, er, ei;
            n = w * L + j;
            // a = r[n] - (ht/h0) r[n-tau];  result = 4096 a / h0
            br = (n - t >= 0) ? rr[n-t] : 0.0;
            bi = (n - t >= 0) ? ri[n-t] : 0.0;
            qr = (htr*h0r + hti*h0i) / den;    // ht/h0
            qi = (hti*h0r - htr*h0i) / den;
            ar = rr[n] - (qr*br - qi*bi);
            ai = ri[n] - (qr*bi + qi*br);
            er = 4096.0 * (ar*h0r + ai*h0i) / den;
            ei = 4096.0 * (ai*h0r - ar*h0i) / den;
            // the first tau samples of a run see the previous run's delay line
            if (n >= t) chk((real'(x[j].re) - er) < 290.0 && (er - real'(x[j].re)) < 290.0 &&
                (real'(x[j].im) - ei) < 290.0 && (ei - real'(x[j].im)) < 290.0,
                            $sformatf("value n=%0d tau=%0d got %0d,%0d exp %0.0f,%0.0f", n, t, x[j].re, x[j].im, er, ei));
            if (n >= t) chk((x[j].re < 0) == (sr[n] < 0) && (x[j].im < 0) == (si[n] < 0), "decision");
          end
          nout++;
        end
      end
    end
    chk(nout == nin, "all words out");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h0 = '0; ht = '0; tau = 1;
    for (int j = 0; j < L; j++) r[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(60, 20, 14, -9, 3);
    run(-40, 55, -20, 10, 21);
    run(70, -10, 10, 16, 128);
    run(50, 50, 0, -22, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
