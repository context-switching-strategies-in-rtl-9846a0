// sync_fifo: the board FIFO between the host side and a CSRC device.
//
// A single-clock FIFO with valid/ready handshakes on both sides and a
// first-word-fall-through read: out_data shows the oldest word whenever
// out_valid is high, and the word is removed in the cycle where out_valid
// and out_ready are both high. A word is accepted in a cycle where in_valid
// and in_ready are high; in_ready is low only when the FIFO is full. A word
// written can be read on the next clock (one clock of latency). count gives
// the fill level for the status flags.
//
// The depth default of 8192 is the smallest of the 8K-64K range quoted for
// the board; the width (16 bits for two video pixels, 8 for a byte stream),
// the handshake and the read style are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  // A full FIFO never accepts, an empty one never delivers.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> 32'(count) < DEPTH);
  assert property (@(posedge clk) disable iff (!rst_n) pop  |-> count > 0);
endmodule
