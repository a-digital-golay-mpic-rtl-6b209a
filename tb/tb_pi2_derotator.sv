// tb_pi2_derotator: self-checking test of the clockwise pi/2 phase shifter.
// Random 15-bit samples (including the most negative value); lane j must
// equal the input multiplied by (-j)^(j mod 4), worked out here with
// integer complex arithmetic and saturation to 15 bits.
module tb_pi2_derotator;
  import tde_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  cpx_out_t d [L], q [L];

  pi2_derotator dut (.*);

  function automatic int sat(input int v);
    return (v > 16383) ? 16383 : (v < -16384) ? -16384 : v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int j = 0; j < L; j++) begin
        d[j].re = (k % 50 == 0) ? 15'sh4000 : OUT_W'($urandom);
        d[j].im = (k % 70 == 0) ? 15'sh4000 : OUT_W'($urandom);
      end
      #1;
      for (int j = 0; j < L; j++) begin
        int a, b, wr, wi, er, ei;
        a = d[j].re; b = d[j].im;
        // (-j)^k as (wr + j wi)
        case (j % 4)
          0: begin wr = 1;  wi = 0;  end
          1: begin wr = 0;  wi = -1; end
          2: begin wr = -1; wi = 0;  end
          default: begin wr = 0; wi = 1; end
        endcase
        er = sat(a*wr - b*wi);
        ei = sat(a*wi + b*wr);
        checks++;
        if (int'(q[j].re) != er || int'(q[j].im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d in %0d,%0d out %0d,%0d", j, a, b, q[j].re, q[j].im);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
