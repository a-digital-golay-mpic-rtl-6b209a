// tb_golay_mpic_tde: end-to-end test of the Golay-MPIC equalizer at its
// default size.
//
// A transmitter model builds the channel estimation sequence from the Golay
// recursion (the sequence matched by the correlator, cyclically extended to
// 1280 samples) and random QPSK payload, pi/2-rotated in SC mode. The
// samples pass a two-path channel h0 x[i] + h[tau] x[i-tau] with +-1 noise.
// Three frames:
//   1. SC, tau = 21: payload before any estimate (must be dropped), CES,
//      payload, a PCES re-estimation in the middle of the payload (payload
//      continues with the old estimate), more payload;
//   2. OFDM, tau = 100: the equalized words go out to the FFT port and come
//      back through a stand-in that only delays them by 4 cycles (it is not
//      an FFT: OFDM data here are sent as time-domain QPSK so the demapper
//      output can be checked);
//   3. SC, tau = 5.
// Checks: estimated h0, h[tau] (within 2 LSB), tau and the main-peak index
// (639) after each CES/PCES; the correlator switched off 170 cycles after
// ces_start and the first estimate usable 175 cycles after it; every equalized word 3 cycles after its payload word and the
// equalizer's mean-square error below 1 % of the symbol energy per
// component; every demapped bit against the transmitted bits, in order and
// with none missing. Each mechanism (estimation, PCES re-estimation with
// the old estimate in use, sleep before the first estimate, correlator
// shut-down during payload, SC de-rotation, OFDM path, mode switch,
// cancellation active, tau inside a word / across words) is counted and
// must occur.
module tb_golay_mpic_tde;
  import tde_pkg::*;
  localparam int L = N_LANES;
  localparam logic [7:0] WV = 8'b1011_0100;    // the correlator's default weights

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

  // ---------------- transmitter and channel ----------------
  int g [512];
  int sym_re [$], sym_im [$];          // transmitted sample stream
  int ch_h0r, ch_h0i, ch_htr, ch_hti, ch_tau;

  typedef struct {
    int cyc;              // cycle the word was presented
    bit ofdm;
    int xr [L];           // transmitted (rotated) symbols of the word
    int xi [L];
    logic [2*L-1:0] bits; // expected demapper output
  } word_t;
  word_t eq_q [$], dm_q [$];

  // mechanism counters
  int n_est = 0, n_pces_old = 0, n_sleep = 0, n_ogc_off = 0, n_sc = 0, n_ofdm = 0;
  int n_switch = 0, n_cancel = 0, n_tau_in_word = 0, n_tau_multi = 0;
  int cyc = 0, ces_cyc = -1, est_ready_cyc = -1, ogc_off_cyc = -1;
  real se = 0.0; int se_n = 0;
  bit last_mode = 0, seen_word = 0, prev_ogc = 0;
  cpx_out_t fft_dly [4][L];
  bit       fft_vdly [4];

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

  function automatic int noise();
    return int'($urandom_range(2)) - 1;
  endfunction

  // one word of symbols through the channel onto r
  task automatic put_word(input int xr [L], input int xi [L]);
    for (int j = 0; j < L; j++) begin
      int n, pr, pi, vr, vi;
      n = sym_re.size();
      sym_re.push_back(xr[j]); sym_im.push_back(xi[j]);
      pr = (n >= ch_tau) ? sym_re[n-ch_tau] : 0;
      pi = (n >= ch_tau) ? sym_im[n-ch_tau] : 0;
      vr = ch_h0r*xr[j] - ch_h0i*xi[j] + ch_htr*pr - ch_hti*pi + noise();
      vi = ch_h0r*xi[j] + ch_h0i*xr[j] + ch_htr*pi + ch_hti*pr + noise();
      r[j].re = SAMPLE_W'(vr);
      r[j].im = SAMPLE_W'(vi);
    end
  endtask

  // ---------------- monitor, once per cycle after the edge ----------------
  task automatic step();
    @(posedge clk);
    #1;
    cyc++;
    // FFT stand-in: 4-cycle delay of the equalizer output
    fft_valid = fft_vdly[3];
    fft_out   = fft_dly[3];
    for (int k = 3; k > 0; k--) begin fft_dly[k] = fft_dly[k-1]; fft_vdly[k] = fft_vdly[k-1]; end
    fft_dly[0] = eq_out; fft_vdly[0] = eq_valid;
    // estimation finished
    if (prev_ogc && !ogc_active) begin n_est++; ogc_off_cyc = cyc; end
    prev_ogc = ogc_active;
    if (est_valid && est_ready_cyc < 0 && ces_cyc >= 0) est_ready_cyc = cyc;
    // equalizer output
    if (eq_valid) begin
      word_t w;
      chk(eq_q.size() > 0, "unexpected eq_valid");
      if (eq_q.size() > 0) begin
        w = eq_q.pop_front();
        chk(cyc == w.cyc + 3, "equalizer latency 3 cycles");
        for (int j = 0; j < L; j++) begin
          real er, ei;
          er = real'(eq_out[j].re) / 4096.0 - w.xr[j];
          ei = real'(eq_out[j].im) / 4096.0 - w.xi[j];
          se += er*er + ei*ei; se_n += 2;
        end
        dm_q.push_back(w);
      end
    end
    // demapper output
    if (demap_valid) begin
      word_t w;
      chk(dm_q.size() > 0, "unexpected demap_valid");
      if (dm_q.size() > 0) begin
        w = dm_q.pop_front();
        chk(demap_bits == w.bits, $sformatf("demapped bits %h exp %h", demap_bits, w.bits));
        if (w.ofdm) n_ofdm++; else n_sc++;
        if (seen_word && w.ofdm != last_mode) n_switch++;
        last_mode = w.ofdm; seen_word = 1;
      end
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic idle_words(input int n);
    int zr [L], zi [L];
    for (int j = 0; j < L; j++) begin zr[j] = 0; zi[j] = 0; end
    repeat (n) begin
      ces_start = 0; payload = 0;
      put_word(zr, zi);
      step();
    end
  endtask

  task automatic ces(input bit is_pces);
    for (int w = 0; w < 160; w++) begin
      int xr [L], xi [L];
      for (int j = 0; j < L; j++) begin
        int n;
        n = w * L + j;
        xr[j] = g[511 - ((n - 128 + 512) % 512)];
        xi[j] = 0;
      end
      ces_start = (w == 0); payload = 0;
      if (w == 0) ces_cyc = cyc;
      put_word(xr, xi);
      step();
    end
    ces_start = 0;
  endtask

  task automatic payload_words(input int n, input bit ofdm, input bit expect_out);
    repeat (n) begin
      word_t w;
      int xr [L], xi [L];
      mode_ofdm = ofdm;
      w.ofdm = ofdm;
      for (int j = 0; j < L; j++) begin
        int a, b, ra, rb;
        a = $urandom_range(1) ? 1 : -1;
        b = $urandom_range(1) ? 1 : -1;
        w.bits[2*j] = (a < 0); w.bits[2*j+1] = (b < 0);
        // pi/2 rotation j^k in SC mode, k = lane (payload starts on lane 0)
        ra = a; rb = b;
        if (!ofdm) begin
          case (j % 4)
            1: begin ra = -b; rb = a;  end
            2: begin ra = -a; rb = -b; end
            3: begin ra = b;  rb = -a; end
            default: ;
          endcase
        end
        xr[j] = ra; xi[j] = rb;
        w.xr[j] = ra; w.xi[j] = rb;
      end
      ces_start = 0; payload = 1;
      put_word(xr, xi);
      w.cyc = cyc;
      if (expect_out) eq_q.push_back(w);
      else n_sleep++;
      if (expect_out && !ogc_active) n_ogc_off++;
      if (expect_out && ogc_active) n_pces_old++;
      if (expect_out && tau_ok) n_cancel++;
      step();
    end
    payload = 0;
  endtask

  task automatic check_estimate(input string name, input bit first);
    if (first) chk(est_ready_cyc - ces_cyc == 175, $sformatf("%s: estimate ready after %0d cycles", name, est_ready_cyc - ces_cyc));
    chk(ogc_off_cyc - ces_cyc == 170, $sformatf("%s: correlator off after %0d cycles", name, ogc_off_cyc - ces_cyc));
    chk(main_idx == 639, $sformatf("%s: main index %0d", name, main_idx));
    chk(tau == TAU_W'(ch_tau) && tau_ok, $sformatf("%s: tau %0d exp %0d", name, tau, ch_tau));
    chk(int'(h0.re) - ch_h0r <= 2 && ch_h0r - int'(h0.re) <= 2 &&
        int'(h0.im) - ch_h0i <= 2 && ch_h0i - int'(h0.im) <= 2,
        $sformatf("%s: h0 %0d,%0d exp %0d,%0d", name, h0.re, h0.im, ch_h0r, ch_h0i));
    chk(int'(ht.re) - ch_htr <= 2 && ch_htr - int'(ht.re) <= 2 &&
        int'(ht.im) - ch_hti <= 2 && ch_hti - int'(ht.im) <= 2,
        $sformatf("%s: ht %0d,%0d exp %0d,%0d", name, ht.re, ht.im, ch_htr, ch_hti));
    if (ch_tau % L != 0 && ch_tau < L) n_tau_in_word++;
    if (ch_tau > L) n_tau_multi++;
  endtask

  task automatic check_mse(input string name);
    chk(se_n > 0 && se / se_n < 0.01, $sformatf("%s: mean-square error %f", name, (se_n > 0) ? se / se_n : -1.0));
    se = 0.0; se_n = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_taps();
    for (int j = 0; j < L; j++) begin r[j] = '0; fft_out[j] = '0; end
    for (int k = 0; k < 4; k++) fft_vdly[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // frame 1: SC, tau 21 (crosses a word boundary)
    ch_h0r = 70; ch_h0i = 25; ch_htr = 12; ch_hti = -9; ch_tau = 21;
    payload_words(4, 0, 0);                  // no estimate yet: dropped
    idle_words(3);
    ces(0);
    idle_words(16);
    check_estimate("frame 1 CES", 1);
    payload_words(60, 0, 1);
    ces(1);                                  // PCES
    payload_words(30, 0, 1);                 // equalized with the old estimate
    check_estimate("frame 1 PCES", 0);
    payload_words(30, 0, 1);
    idle_words(8);
    check_mse("frame 1");

    // frame 2: OFDM, tau 100 (several words)
    ch_h0r = -50; ch_h0i = 60; ch_htr = -10; ch_hti = 12; ch_tau = 100;
    idle_words(3);
    ces(0);
    idle_words(16);
    check_estimate("frame 2 CES", 0);
    payload_words(60, 1, 1);
    idle_words(10);
    check_mse("frame 2");

    // frame 3: SC, tau 5 (inside a word)
    ch_h0r = 80; ch_h0i = 0; ch_htr = 0; ch_hti = 14; ch_tau = 5;
    idle_words(3);
    ces(0);
    idle_words(16);
    check_estimate("frame 3 CES", 0);
    payload_words(40, 0, 1);
    idle_words(10);
    check_mse("frame 3");

    chk(eq_q.size() == 0 && dm_q.size() == 0, "every payload word equalized and demapped");
    $display("mechanisms: estimations=%0d pces_with_old_estimate=%0d sleep_dropped=%0d ogc_off_payload=%0d sc_words=%0d ofdm_words=%0d mode_switches=%0d cancel_words=%0d tau_in_word=%0d tau_multi_word=%0d",
             n_est, n_pces_old, n_sleep, n_ogc_off, n_sc, n_ofdm, n_switch, n_cancel, n_tau_in_word, n_tau_multi);
    chk(n_est == 4, "estimations");
    chk(n_pces_old > 0, "payload during PCES re-estimation");
    chk(n_sleep > 0, "payload dropped before the first estimate");
    chk(n_ogc_off > 0, "correlator shut down during payload");
    chk(n_sc > 0, "SC path");
    chk(n_ofdm > 0, "OFDM path");
    chk(n_switch >= 2, "mode switches");
    chk(n_cancel > 0, "cancellation active");
    chk(n_tau_in_word > 0 && n_tau_multi > 0, "tau inside a word and across words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
