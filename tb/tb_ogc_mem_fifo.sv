// tb_ogc_mem_fifo: self-checking test of the 256-sample memory FIFO.
// Feeds random 144-bit words with en randomly low now and then and checks
// that dout equals the word presented exactly DEPTH enabled cycles before.
module tb_ogc_mem_fifo;
  localparam int WW = 144, DEPTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, en = 0;
  logic [WW-1:0] din = '0, dout;
  logic [WW-1:0] hist [$];

  ogc_mem_fifo #(.WORD_W(WW), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [WW-1:0] rnd();
    logic [WW-1:0] v;
    for (int i = 0; i < WW; i += 16) v[i +: 16] = 16'($urandom);
    return v;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      en  = ($urandom_range(9) != 0);
      din = rnd();
      // dout during an enabled cycle is the word DEPTH enabled cycles back
      #1;
      if (en && hist.size() >= DEPTH) begin
        checks++;
        if (dout !== hist[hist.size()-DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d", c);
        end
      end
      if (en) hist.push_back(din);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
