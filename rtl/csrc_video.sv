// csrc_video: CSRC A configured with three video filters as contexts, for
// host-driven switching.
//
// A video stream (two 8-bit pixels per 16-bit word, frames of W x H) flows
// through the device; the active context decides what comes out:
//   context 00  pass-through delayed by one frame: out = S
//   context 01  delay with fading:                 out = S, and S takes
//                                                  (S + in) / 2 instead of in
//   context 10  difference:                        out = |in - S|
// where S is the same pixel of the frame store in the device memory, which
// otherwise takes the incoming pixel. Context 11 behaves as context 00.
// The word position within the frame is kept in a register shared by all
// contexts, so the host can switch filters between any two words and the
// next word is processed by the new filter (one-clock switch).
//
// Timing: per word, one clock to read the stored word, then the result is
// offered on out_*; when it is taken, the input word is consumed and the
// store written. Two clocks per word without back-pressure.
//
// The three filters and their host-driven switching follow the platform
// demonstration; the fading rule (mean of stored and new pixel), the shared
// frame store and the schedule are this design's choices.
module csrc_video
  import csrc_pkg::*;
#(
  parameter int unsigned W = FRAME_W,
  parameter int unsigned H = FRAME_H
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_t        ctx,
  input  logic        ctx_sw,
  output ctx_t        active,
  output logic [15:0] switch_count,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data
);
  localparam int unsigned WORDS = W * H / 2;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam ctx_t CTX_FADE = 2'b01, CTX_VDIFF = 2'b10;  // 00 and 11: pass

  typedef enum logic {S_RD, S_OUT} st_e;
  st_e           st;
  logic [AW-1:0] idx;
  logic [15:0]   stored, store_next;
  logic          switched, take;

  ctx_switch #(.NUM_CTX(NUM_CTX)) u_ctx (
    .clk, .rst_n, .ctx, .ctx_sw, .active, .switched, .switch_count);

  csram #(.WIDTH(16), .DEPTH(WORDS)) u_ram (
    .clk, .we(take), .waddr(idx), .wdata(store_next),
    .re(st == S_RD && in_valid), .raddr(idx), .rdata(stored));

  function automatic logic [7:0] absdiff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic logic [7:0] mean(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[8:1];
  endfunction

  always_comb begin
    store_next = in_data;
    unique case (active)
      CTX_FADE: begin
        out_data   = stored;
        store_next = {mean(stored[15:8], in_data[15:8]), mean(stored[7:0], in_data[7:0])};
      end
      CTX_VDIFF: out_data = {absdiff(in_data[15:8], stored[15:8]), absdiff(in_data[7:0], stored[7:0])};
      default:   out_data = stored;
    endcase
  end

  assign out_valid = (st == S_OUT);
  assign take      = (st == S_OUT) && out_ready;
  assign in_ready  = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_RD;
      idx <= '0;
    end else begin
      unique case (st)
        S_RD:  if (in_valid) st <= S_OUT;
        S_OUT: if (out_ready) begin
          st  <= S_RD;
          idx <= (idx == AW'(WORDS - 1)) ? '0 : idx + 1'b1;
        end
        default: st <= S_RD;
      endcase
    end
  end

  // The input word stays offered while its result is pending.
  assert property (@(posedge clk) disable iff (!rst_n) st == S_OUT |-> in_valid);
endmodule
