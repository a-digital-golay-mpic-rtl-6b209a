// sp_ram: single-port synchronous memory block, W bits x N words.
//
// One access per cycle: a write (we) or a read (re); rdata holds the word
// read in the previous cycle until the next read. This stands for one block
// of the receiver's shared memory bank; two of them form the correlator's
// 256-sample FIFO (16 words of 144 bits each, as in the source design).
// Asserting we and re together is a usage error and is flagged by an
// assertion.
module sp_ram #(
  parameter int W = 144,
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic                 re,
  input  logic [$clog2(N)-1:0] addr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         rdata
);
  logic [W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

  a_single_port: assert property (@(posedge clk) !(we && re));
endmodule
