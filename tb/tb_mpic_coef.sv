// tb_mpic_coef: self-checking test of the equalizer's common terms.
// For random 9-bit taps h0 (|h0| between 48 and 180) and h[tau] (smaller)
// it checks, against complex arithmetic done here in reals, that
// c ~ 2^24 conj(h0)/|h0|^2 and m ~ 4096 h[tau]/h0 (within 4 %, the
// reciprocal's resolution plus rounding), that m is 0 when tau_ok is low,
// and that valid comes 5 cycles after load.
module tb_mpic_coef;
  import tde_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, load = 0, tau_ok = 0;
  logic [TAU_W-1:0] tau = 1, tau_o;
  cpx_h_t h0, ht;
  logic signed [C_W-1:0] c_re, c_im;
  logic signed [M_W-1:0] m_re, m_im;
  logic valid;

  mpic_coef dut (.*);

  task automatic near(input real got, input real exp, input real scale, input string what);
    checks++;
    if ((got - exp) > 0.04 * scale + 2.0 || (exp - got) > 0.04 * scale + 2.0) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
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
    h0 = '0; ht = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int a, b, cr, ci, lat;
      real p, ecr, eci, emr, emi, mag;
      do begin
        a = $urandom_range(360) - 180;
        b = $urandom_range(360) - 180;
        p = real'(a*a + b*b);
      end while (p < 48.0*48.0 || p > 180.0*180.0);
      cr = $urandom_range(120) - 60;
      ci = $urandom_range(120) - 60;
      h0.re = H_W'(a); h0.im = H_W'(b);
      ht.re = H_W'(cr); ht.im = H_W'(ci);
      tau_ok = (k % 5 != 0);
      tau = TAU_W'($urandom_range(1, 128));
      load = 1;
      @(negedge clk);
      load = 0;
      lat = 1;
      while (!valid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (tau_o != tau) begin failures++; $display("FAIL tau_o"); end
      @(negedge clk);
      ecr = 16777216.0 * a / p;
      eci = -16777216.0 * b / p;
      mag = 16777216.0 / $sqrt(p);
      near(real'(c_re), ecr, mag, "c_re");
      near(real'(c_im), eci, mag, "c_im");
      // m = 4096 * ht / h0 = 4096 * ht * conj(h0) / |h0|^2
      emr = tau_ok ? 4096.0 * (cr*a + ci*b) / p : 0.0;
      emi = tau_ok ? 4096.0 * (ci*a - cr*b) / p : 0.0;
      mag = tau_ok ? 4096.0 * $sqrt(real'(cr*cr + ci*ci) / p) : 0.0;
      near(real'(m_re), emr, mag, "m_re");
      near(real'(m_im), emi, mag, "m_im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
