// csram: the on-chip memory of a CSRC device, shared by all its contexts.
//
// Contexts hand data to each other through this memory: one context writes
// an image, the next context (after a context switch) reads it. It has one
// synchronous write port and one synchronous read port; rdata holds the
// word at raddr one clock after re is high, and keeps it otherwise. A read
// and a write of the same address in the same cycle return the old word.
//
// That the memory is shared between contexts follows the platform
// description; its size and port structure are this design's choice. The
// default depth holds three 160x120 frames at two pixels per word.
module csram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 28800
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
