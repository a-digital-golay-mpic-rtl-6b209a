// ogc_mem_fifo: the 256-sample delay line ahead of the Golay correlator
// ("MEM Bank"), 32 words of 8 samples, built from two single-port memories.
//
// Word w (counted over enabled cycles) is stored in memory w%2 at address
// (w/2)%16. In every enabled cycle one memory writes the incoming word while
// the other reads the word that entered DEPTH-1 cycles earlier; the read
// data register then presents it one cycle later, so dout is din delayed by
// exactly DEPTH enabled cycles. Each memory thus alternates between a write
// and a read, which is the interleaved access of the source design; the
// addressing scheme is this design's own. With en low no memory is
// accessed and the content is kept, so the bank may serve other users while
// the correlator sleeps (the data are then stale for DEPTH cycles after
// re-enabling, which the window timing of the peak search tolerates).
module ogc_mem_fifo #(
  parameter int WORD_W = 144,
  parameter int DEPTH  = 32            // even; two memories of DEPTH/2 words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [WORD_W-1:0] din,
  output logic [WORD_W-1:0] dout
);
  localparam int HALF = DEPTH / 2;
  localparam int AW   = $clog2(HALF);

  logic [$clog2(DEPTH)-1:0] wcnt;      // word counter modulo DEPTH
  logic [$clog2(DEPTH)-1:0] rcnt;      // word read this cycle: wcnt - (DEPTH-1)
  logic                     rsel_q;    // memory read in the previous cycle
  logic [WORD_W-1:0]        rdata [2];
  logic [1:0]               we, re;
  logic [AW-1:0]            addr [2];

  assign rcnt = wcnt + 1'b1;           // == wcnt - (DEPTH-1) modulo DEPTH

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      we[k]   = en && (wcnt[0] == k[0]);
      re[k]   = en && (rcnt[0] == k[0]);
      addr[k] = we[k] ? wcnt[AW:1] : rcnt[AW:1];
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    sp_ram #(.W(WORD_W), .N(HALF)) u_ram (
      .clk, .we(we[k]), .re(re[k]), .addr(addr[k]), .wdata(din), .rdata(rdata[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt   <= '0;
      rsel_q <= 1'b0;
    end else if (en) begin
      wcnt   <= wcnt + 1'b1;
      rsel_q <= rcnt[0];
    end
  end

  assign dout = rdata[rsel_q];
endmodule
