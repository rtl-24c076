// mem_bank: one of the four data memory banks of the in-place FFT.
//
// A simple dual-port memory of DEPTH words of W bits: one synchronous read
// port (data appears the clock after raddr is presented with re=1) and one
// synchronous write port. With four banks of NMAX/4 = 2048 words the banks
// hold one 8192-point symbol, as the processor needs. The port structure
// (one read, one write, so reads of one butterfly overlap the write-back of
// an earlier one) is this design's choice; the text only asks for four
// banks. A read and a write of the same word in one cycle return the old
// word; the controller never does this.
module mem_bank #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
