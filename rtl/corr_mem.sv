// Pass-result memory: simple dual-port RAM of DEPTH words of W bits.
//
// Holds one intermediate correlation pass y_{i,n} (16384 complex samples of two
// 16-bit halves by default, the "2 x 16384" memory of the source design) until
// the last pass arrives and the three passes are combined.
//
// Interface: write port we/waddr/wdata; read port re/raddr, rdata.
// Timing: write on the clock edge; read data registered, one cycle after re.
// Contents are not reset. Port style and read latency are choices of this design.
module corr_mem #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [0:DEPTH-1];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
