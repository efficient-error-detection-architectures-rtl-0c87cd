// Data memory of the hardware SABER datapath: a simple dual-port RAM of
// DEPTH 64-bit words, one write port and one read port with one cycle of read
// latency (block-RAM style, no reset of the contents). It holds the secret
// polynomial written by the binomial sampler and the public polynomial a(x)
// that the multiplier reads through its coefficient selector.
// The published design names a block-RAM data memory; depth and ports are
// this design's own choice.
module saber_data_mem
  import saber_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WORD_W-1:0]        wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WORD_W-1:0]        rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
