// tb_ogc_stage: self-checking test of one OGC stage, in both of its
// structures: D = 4 (lane re-routing with one-word registers, weight -1)
// and D = 16 (two-word shift register, weight +1). Random inputs and a
// randomly gated enable; the reference keeps the sum stream sample by
// sample and checks t = W(q-p) and s = (p+q) delayed D samples, one
// enabled cycle after the inputs.
module tb_ogc_stage;
  localparam int L = 8, XW = 18, IW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, en = 0;
  logic signed [XW-1:0] p_re [L], p_im [L], q_re [L], q_im [L];
  logic signed [XW-1:0] ta_re [L], ta_im [L], sa_re [L], sa_im [L];
  logic signed [XW-1:0] tb_re [L], tb_im [L], sb_re [L], sb_im [L];

  ogc_stage #(.LANES(L), .D(4),  .WGT(-1), .IW(IW), .XW(XW)) dut_a (
    .clk, .rst_n, .en, .p_re, .p_im, .q_re, .q_im,
    .t_re(ta_re), .t_im(ta_im), .s_re(sa_re), .s_im(sa_im));
  ogc_stage #(.LANES(L), .D(16), .WGT(1),  .IW(IW), .XW(XW)) dut_b (
    .clk, .rst_n, .en, .p_re, .p_im, .q_re, .q_im,
    .t_re(tb_re), .t_im(tb_im), .s_re(sb_re), .s_im(sb_im));

  int sum_re [$], sum_im [$];       // sample stream of p+q
  int dre [L], dim [L];             // q-p of the last enabled word

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
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
    for (int j = 0; j < L; j++) begin p_re[j] = 0; p_im[j] = 0; q_re[j] = 0; q_im[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      en = ($urandom_range(7) != 0);
      for (int j = 0; j < L; j++) begin
        p_re[j] = XW'($signed(IW'($urandom))); p_im[j] = XW'($signed(IW'($urandom)));
        q_re[j] = XW'($signed(IW'($urandom))); q_im[j] = XW'($signed(IW'($urandom)));
      end
      @(posedge clk);
      if (en) begin
        for (int j = 0; j < L; j++) begin
          sum_re.push_back(int'(p_re[j]) + int'(q_re[j]));
          sum_im.push_back(int'(p_im[j]) + int'(q_im[j]));
          dre[j] = int'(q_re[j]) - int'(p_re[j]);
          dim[j] = int'(q_im[j]) - int'(p_im[j]);
        end
      end
      @(negedge clk);
      if (en && sum_re.size() > 16 + L) begin
        int n0;
        n0 = sum_re.size() - L;                  // stream index of lane 0
        for (int j = 0; j < L; j++) begin
          chk(ta_re[j], -dre[j], "t_re D=4");
          chk(ta_im[j], -dim[j], "t_im D=4");
          chk(tb_re[j],  dre[j], "t_re D=16");
          chk(tb_im[j],  dim[j], "t_im D=16");
          chk(sa_re[j], sum_re[n0+j-4],  "s_re D=4");
          chk(sa_im[j], sum_im[n0+j-4],  "s_im D=4");
          chk(sb_re[j], sum_re[n0+j-16], "s_re D=16");
          chk(sb_im[j], sum_im[n0+j-16], "s_im D=16");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
