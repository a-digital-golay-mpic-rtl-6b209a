// tb_sp_ram: self-checking test of the single-port memory.
// Writes random words to every address, reads them back in random order
// and checks data, the one-cycle read latency and that rdata holds while no
// read is issued.
module tb_sp_ram;
  localparam int W = 144, N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [3:0] addr = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [N];

  sp_ram #(.W(W), .N(N)) dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 16] = 16'($urandom);
    for (int i = 16; i < W; i += 32) v[i +: 16] = 16'($urandom);
    return v;
  endfunction

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; re = 0; addr = 4'(a); wdata = rnd(); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(N-1);
      if ($urandom_range(3) == 0) begin
        we = 1; re = 0; addr = 4'(a); wdata = rnd(); model[a] = wdata;
        @(negedge clk);
        we = 0;
      end else begin
        logic [W-1:0] held;
        re = 1; addr = 4'(a);
        @(negedge clk);
        check(model[a], "read");
        held = rdata;
        re = 0; addr = 4'($urandom_range(N-1));
        @(negedge clk);
        check(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
