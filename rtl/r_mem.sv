// r_mem: R storage memory. Holds the check-to-variable messages R_mj of the
// last iteration for every edge: one word per row group (12 blocks x 15
// groups = 180 words), each word carrying the 8 edge slots x 24 lanes x 6 bits
// of one group. The PAB reads the old messages of a group while the router
// receives the new ones, which are written back to the same word.
//
// Simple dual-port RAM with a registered (block RAM style) read: the word
// addressed by raddr in one cycle appears on rdata in the next. Write on the
// rising edge when we = 1. The decoder issues raddr one cycle ahead.
module r_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = J * WPB
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output rword_t [WMAX-1:0]        rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  rword_t [WMAX-1:0]        wdata
);
  rword_t [WMAX-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
