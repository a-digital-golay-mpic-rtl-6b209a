// tb_mpic_path_delay: self-checking test of the 2nd-path delay line.
// Random 16-bit samples, tau changed every 100 words over 1..136 (always
// including 1, 7, 8, 9, 128 and 136), en gated randomly; each output lane
// must equal the stream sample tau positions earlier.
module tb_mpic_path_delay;
  import tde_pkg::*;
  localparam int L = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, en = 0;
  logic [TAU_W-1:0] tau;
  logic signed [W-1:0] d_re [L], d_im [L], q_re [L], q_im [L];

  mpic_path_delay #(.LANES(L), .WORDS(17), .W(W)) dut (.*);

  int sr [$], si [$];
  int taus [] = '{1, 7, 8, 9, 128, 136, 3, 64, 100, 17, 33, 120};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tau = 1;
    for (int j = 0; j < L; j++) begin d_re[j] = '0; d_im[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1200; c++) begin
      int n0, ti;
      tau = TAU_W'(taus[(c / 100) % taus.size()]);
      en  = ($urandom_range(4) != 0);
      for (int j = 0; j < L; j++) begin d_re[j] = W'($urandom); d_im[j] = W'($urandom); end
      n0 = sr.size();                       // stream index of lane 0 of this word
      for (int j = 0; j < L; j++) begin sr.push_back(int'(d_re[j])); si.push_back(int'(d_im[j])); end
      ti = int'(tau);
      #1;
      if (n0 >= 140) begin
        for (int j = 0; j < L; j++) begin
          checks++;
          if (int'(q_re[j]) != sr[n0+j-ti] || int'(q_im[j]) != si[n0+j-ti]) begin
            failures++;
            if (failures < 10) $display("FAIL c=%0d lane %0d tau %0d", c, j, tau);
          end
        end
      end
      if (!en) begin
        // the word is not taken into the delay line: drop it from the stream
        repeat (L) begin void'(sr.pop_back()); void'(si.pop_back()); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
