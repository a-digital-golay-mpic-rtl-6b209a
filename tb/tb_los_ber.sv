// tb_los_ber: uncoded bit-error rate of the whole equalizer in a noisy
// line-of-sight channel, pi/2-QPSK single-carrier mode, at default size.
//
// The channel has two paths, h0 x[i] + h[tau] x[i-tau], plus complex white
// Gaussian noise (Box-Muller from $urandom). tau = 6 is the 3.2 ns RMS
// delay of the LOS residual channel at 1760 MS/s, rounded. |h[tau]/h0| is
// about 0.24. Samples are rounded and saturated to 9 bits. SNR is the
// main-path symbol energy over N0, |h0|^2 E|x|^2 / (2 sigma^2). Each SNR
// point sends its own noisy CES and then 6000 payload words (96000 bits),
// and the design's demapped bits are counted against the transmitted ones.
// Two receivers are computed alongside in reals, on the same quantized
// samples:
//   ideal  - de-convolution with the true channel,
//            x[i] = (r[i] - h[tau] x[i-tau]) / h0;
//   1-tap  - r[i] / h0 only, with no cancellation of the second path.
// Checks per point: tau, tau_ok and main index of the estimate; design
// errors at most 1.2 x ideal + 4 sqrt(ideal) + 5; design better than
// 1-tap. At 8 dB the design must also reach a BER of 1e-2 or lower. The
// first payload word of each point is not counted, because the
// equalizer's delay line still holds the previous point's samples.
module tb_los_ber;
  import tde_pkg::*;
  localparam int L = N_LANES;
  localparam logic [7:0] WV = 8'b1011_0100;    // the correlator's default weights
  localparam int N_WORDS = 6000;
  localparam real PI = 3.14159265358979;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, mode_ofdm = 0, ces_start = 0, payload = 0, fft_valid = 0;
  cpx_in_t  r [L];
  cpx_out_t eq_out [L], fft_out [L];
  logic eq_valid, demap_valid, tau_ok, est_valid, ogc_active;
  logic [2*L-1:0] demap_bits;
  cpx_h_t h0, ht;
  logic [TAU_W-1:0] tau;
  logic [IDX_W-1:0] main_idx;

  golay_mpic_tde dut (.*);

  int g [512];
  real tx_re [$], tx_im [$];             // transmitted sample stream
  real xd_re [$], xd_im [$];             // ideal receiver's decisions input
  real h0r, h0i, htr, hti, sigma;
  int  ch_tau, cyc = 0;

  typedef struct {
    logic [2*L-1:0] bits;
    bit counted;
  } word_t;
  word_t dm_q [$];
  int err_dut, err_ideal, err_1tap, nbits, n_points = 0, n_cancel = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
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

  function automatic real uni();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic int quant(input real v);
    int k;
    k = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (k > 255) k = 255;
    if (k < -255) k = -255;
    return k;
  endfunction

  // one word of symbols through the channel onto r; rr/ri return the
  // quantized samples for the reference receivers
  task automatic put_word(input real xr [L], input real xi [L], output int rr [L], output int ri [L]);
    for (int j = 0; j < L; j++) begin
      int n;
      real pr, pi, mag, ph, vr, vi;
      n = tx_re.size();
      tx_re.push_back(xr[j]); tx_im.push_back(xi[j]);
      pr = (n >= ch_tau) ? tx_re[n-ch_tau] : 0.0;
      pi = (n >= ch_tau) ? tx_im[n-ch_tau] : 0.0;
      mag = sigma * $sqrt(-2.0 * $ln(uni()));
      ph  = 2.0 * PI * uni();
      vr = h0r*xr[j] - h0i*xi[j] + htr*pr - hti*pi + mag * $cos(ph);
      vi = h0r*xi[j] + h0i*xr[j] + htr*pi + hti*pr + mag * $sin(ph);
      rr[j] = quant(vr);
      ri[j] = quant(vi);
      r[j].re = SAMPLE_W'(rr[j]);
      r[j].im = SAMPLE_W'(ri[j]);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    cyc++;
    if (demap_valid) begin
      word_t w;
      chk(dm_q.size() > 0, "unexpected demap_valid");
      if (dm_q.size() > 0) begin
        w = dm_q.pop_front();
        if (w.counted) err_dut += $countones(demap_bits ^ w.bits);
      end
    end
  endtask

  task automatic idle_words(input int n);
    real zr [L], zi [L];
    int rr [L], ri [L];
    for (int j = 0; j < L; j++) begin zr[j] = 0.0; zi[j] = 0.0; end
    repeat (n) begin
      ces_start = 0; payload = 0;
      put_word(zr, zi, rr, ri);
      step();
    end
  endtask

  task automatic ces();
    for (int w = 0; w < 160; w++) begin
      real xr [L], xi [L];
      int rr [L], ri [L];
      for (int j = 0; j < L; j++) begin
        xr[j] = real'(g[511 - ((w * L + j - 128 + 512) % 512)]);
        xi[j] = 0.0;
      end
      ces_start = (w == 0); payload = 0;
      put_word(xr, xi, rr, ri);
      step();
    end
    ces_start = 0;
  endtask

  // complex division helpers for the reference receivers
  function automatic real div_re(input real ar, input real ai, input real br, input real bi);
    return (ar*br + ai*bi) / (br*br + bi*bi);
  endfunction
  function automatic real div_im(input real ar, input real ai, input real br, input real bi);
    return (ai*br - ar*bi) / (br*br + bi*bi);
  endfunction

  task automatic payload_words(input int n);
    xd_re.delete(); xd_im.delete();
    for (int k = 0; k < n; k++) begin
      word_t w;
      real xr [L], xi [L];
      int rr [L], ri [L];
      for (int j = 0; j < L; j++) begin
        int a, b;
        a = ($urandom_range(1) != 0) ? 1 : -1;
        b = ($urandom_range(1) != 0) ? 1 : -1;
        w.bits[2*j] = (a < 0); w.bits[2*j+1] = (b < 0);
        // pi/2 rotation j^k, k = lane (payload starts on lane 0)
        case (j % 4)
          1: begin xr[j] = -b; xi[j] = a;  end
          2: begin xr[j] = -a; xi[j] = -b; end
          3: begin xr[j] = b;  xi[j] = -a; end
          default: begin xr[j] = a; xi[j] = b; end
        endcase
      end
      w.counted = (k > 0);
      mode_ofdm = 0; ces_start = 0; payload = 1;
      put_word(xr, xi, rr, ri);
      if (tau_ok) n_cancel++;
      // reference receivers, decisions in the rotated domain (a rotation
      // by a multiple of pi/2 maps bit errors one to one)
      for (int j = 0; j < L; j++) begin
        int m;
        real ar, ai, dr, di, pr, pi;
        m = xd_re.size();
        pr = (m >= ch_tau) ? xd_re[m-ch_tau] : 0.0;
        pi = (m >= ch_tau) ? xd_im[m-ch_tau] : 0.0;
        ar = real'(rr[j]) - (htr*pr - hti*pi);
        ai = real'(ri[j]) - (htr*pi + hti*pr);
        dr = div_re(ar, ai, h0r, h0i);
        di = div_im(ar, ai, h0r, h0i);
        xd_re.push_back(dr); xd_im.push_back(di);
        if (w.counted) begin
          err_ideal += int'((dr < 0.0) != (xr[j] < 0.0)) + int'((di < 0.0) != (xi[j] < 0.0));
          dr = div_re(real'(rr[j]), real'(ri[j]), h0r, h0i);
          di = div_im(real'(rr[j]), real'(ri[j]), h0r, h0i);
          err_1tap  += int'((dr < 0.0) != (xr[j] < 0.0)) + int'((di < 0.0) != (xi[j] < 0.0));
          nbits += 2;
        end
      end
      dm_q.push_back(w);
      step();
    end
    payload = 0;
  endtask

  task automatic run_point(input real snr_db, input real ber_max);
    real snr, ber;
    snr = 10.0 ** (snr_db / 10.0);
    sigma = $sqrt((h0r*h0r + h0i*h0i) / snr);
    err_dut = 0; err_ideal = 0; err_1tap = 0; nbits = 0;
    idle_words(4);
    ces();
    idle_words(16);
    chk(tau_ok && tau == TAU_W'(ch_tau), $sformatf("%0.0f dB: tau %0d (ok %0b) exp %0d", snr_db, tau, tau_ok, ch_tau));
    chk(main_idx == 639, $sformatf("%0.0f dB: main index %0d", snr_db, main_idx));
    payload_words(N_WORDS);
    idle_words(8);
    ber = real'(err_dut) / real'(nbits);
    $display("SNR %4.1f dB: bits %0d  errors design %0d (BER %.2e)  ideal %0d  1-tap %0d  estimate h0 %0d,%0d h[tau] %0d,%0d",
             snr_db, nbits, err_dut, ber, err_ideal, err_1tap, int'(h0.re), int'(h0.im), int'(ht.re), int'(ht.im));
    chk(real'(err_dut) <= 1.2 * real'(err_ideal) + 4.0 * $sqrt(real'(err_ideal)) + 5.0,
        $sformatf("%0.0f dB: design %0d errors against ideal %0d", snr_db, err_dut, err_ideal));
    chk(err_dut < err_1tap, $sformatf("%0.0f dB: design %0d errors, no better than 1-tap %0d", snr_db, err_dut, err_1tap));
    if (ber_max > 0.0) chk(ber <= ber_max, $sformatf("%0.0f dB: BER %.2e above %.0e", snr_db, ber, ber_max));
    n_points++;
  endtask

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_taps();
    for (int j = 0; j < L; j++) begin r[j] = '0; fft_out[j] = '0; end
    h0r = 58.0; h0i = 30.0; htr = 10.0; hti = -12.0; ch_tau = 6;
    sigma = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_point(6.0, 0.0);
    run_point(8.0, 1.0e-2);
    run_point(10.0, 0.0);
    chk(dm_q.size() == 0, "every payload word demapped");
    $display("mechanisms: snr_points=%0d cancel_words=%0d", n_points, n_cancel);
    chk(n_points == 3 && n_cancel > 0, "all points run with cancellation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
