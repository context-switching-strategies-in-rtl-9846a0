// csrc_motion: CSRC A configured for the motion-detection application.
//
// The device holds the three stages of the algorithm in three contexts:
// difference (context 00), 4x4 low-pass filter (01) and binary image
// generator (10). Only the active context runs; the others keep their
// registers. The contexts pass the image to each other through the shared
// on-chip memory, laid out as three regions of W*H/2 words: previous frame,
// difference image, filtered image. The interface is the one a controller
// sees on the device pins:
//
//   ctx, ctx_sw   context lines: ctx becomes active on the clock where
//                 ctx_sw is high (one-clock switch)
//   calc          start/continue the computation of the active context
//   done          the active context has finished (held until calc falls)
//   in_*          current frame from the input FIFO (difference context)
//   out_*         binary image to the output FIFO (binary context)
//
// Context 11 is unused and does nothing. The partition into contexts and
// the use of the shared memory follow the application description; the
// memory layout is this design's choice.
module csrc_motion
  import csrc_pkg::*;
#(
  parameter int unsigned W      = FRAME_W,
  parameter int unsigned H      = FRAME_H,
  parameter logic [7:0]  THRESH = 8'd16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_t        ctx,
  input  logic        ctx_sw,
  input  logic        calc,
  output logic        done,
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
  localparam int unsigned DEPTH = 3 * WORDS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          switched;
  logic          en_d, en_l, en_b;
  logic          done_d, done_l, done_b;
  logic          re_d, re_l, re_b, we_d, we_l;
  logic [AW-1:0] ra_d, ra_l, ra_b, wa_d, wa_l;
  logic [15:0]   wd_d, wd_l, rdata;
  logic          mem_re, mem_we;
  logic [AW-1:0] mem_raddr, mem_waddr;
  logic [15:0]   mem_wdata;

  ctx_switch #(.NUM_CTX(NUM_CTX)) u_ctx (
    .clk, .rst_n, .ctx, .ctx_sw, .active, .switched, .switch_count);

  assign en_d = (active == CTX_DIFF);
  assign en_l = (active == CTX_LPF);
  assign en_b = (active == CTX_BIN);

  md_diff #(.W(W), .H(H), .AW(AW), .PREV_BASE(0), .DIFF_BASE(WORDS)) u_diff (
    .clk, .rst_n, .en(en_d), .calc, .done(done_d),
    .in_valid, .in_ready, .in_data,
    .mem_re(re_d), .mem_raddr(ra_d), .mem_rdata(rdata),
    .mem_we(we_d), .mem_waddr(wa_d), .mem_wdata(wd_d));

  md_lpf #(.W(W), .H(H), .AW(AW), .DIFF_BASE(WORDS), .FILT_BASE(2 * WORDS)) u_lpf (
    .clk, .rst_n, .en(en_l), .calc, .done(done_l),
    .mem_re(re_l), .mem_raddr(ra_l), .mem_rdata(rdata),
    .mem_we(we_l), .mem_waddr(wa_l), .mem_wdata(wd_l));

  md_bin #(.W(W), .H(H), .AW(AW), .FILT_BASE(2 * WORDS), .THRESH(THRESH)) u_bin (
    .clk, .rst_n, .en(en_b), .calc, .done(done_b),
    .mem_re(re_b), .mem_raddr(ra_b), .mem_rdata(rdata),
    .out_valid, .out_ready, .out_data);

  // Memory ports belong to the active context
  always_comb begin
    mem_re = 1'b0; mem_raddr = '0; mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0; done = 1'b0;
    unique case (active)
      CTX_DIFF: begin
        mem_re = re_d; mem_raddr = ra_d; mem_we = we_d; mem_waddr = wa_d; mem_wdata = wd_d;
        done = done_d;
      end
      CTX_LPF: begin
        mem_re = re_l; mem_raddr = ra_l; mem_we = we_l; mem_waddr = wa_l; mem_wdata = wd_l;
        done = done_l;
      end
      CTX_BIN: begin
        mem_re = re_b; mem_raddr = ra_b;
        done = done_b;
      end
      default: ;
    endcase
  end

  csram #(.WIDTH(16), .DEPTH(DEPTH)) u_ram (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata);
endmodule
