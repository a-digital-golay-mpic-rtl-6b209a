// tb_qpsk_demapper: self-checking test of the QPSK hard demapper.
// Random samples (a third of them with a zero real part) and a random
// valid; one cycle after a valid word, bit 2j must be 1 exactly when lane
// j's real part is negative and bit 2j+1 when its imaginary part is, with
// out_valid following in_valid by one cycle and bits held otherwise.
module tb_qpsk_demapper;
  import tde_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  cpx_out_t d [L];
  logic [2*L-1:0] bits;

  qpsk_demapper dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*L-1:0] e, held;
    bit v;
    for (int j = 0; j < L; j++) d[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    held = '0;
    for (int k = 0; k < 2000; k++) begin
      v = ($urandom_range(3) != 0);
      for (int j = 0; j < L; j++) begin
        int a, b;
        a = (k % 3 == 0) ? 0 : int'($urandom_range(32767)) - 16384;
        b = int'($urandom_range(32767)) - 16384;
        d[j].re = OUT_W'(a); d[j].im = OUT_W'(b);
        e[2*j] = (a < 0); e[2*j+1] = (b < 0);
      end
      in_valid = v;
      @(negedge clk);
      if (v) held = e;
      checks++;
      if (bits !== held || out_valid !== v) begin
        failures++;
        if (failures < 10) $display("FAIL got %h/%b exp %h/%b", bits, out_valid, held, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
