// sram_1r1w: synchronous memory with one read port and one write port, used
// for the data memory and the coefficient memory of the datapath.
//
// A read presents raddr at a rising edge with re high and returns the word on
// rdata after that edge; rdata holds until the next read. A write stores
// wdata at waddr at the rising edge when we is high. A read and a write of
// the same address at the same edge return the old word. The contents are
// not reset.
//
// The document names the two memories and prints their 16-bit data width;
// depth, port arrangement and read latency are this design's choices.
module sram_1r1w #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AB   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AB-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AB-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
