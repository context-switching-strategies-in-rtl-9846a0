// video_system: host-driven switching between video filters.
//
// Video words enter through the input FIFO, pass through CSRC A, which
// holds three filters in its contexts (see csrc_video), and leave through
// the output FIFO. The host changes the filter by a context-switch request
// (host_ctx with host_sw high for one clock) that the support FPGA's
// router passes to the device; it takes effect from the next word. mode
// selects the router's source (SRC_HOST for this demonstration).
//
// Host-driven filter switching follows the platform demonstration; FIFO
// sizes and handshakes are this design's choices.
module video_system
  import csrc_pkg::*;
#(
  parameter int unsigned W          = FRAME_W,
  parameter int unsigned H          = FRAME_H,
  parameter int unsigned FIFO_DEPTH = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_src_e    mode,
  input  ctx_t        host_ctx,
  input  logic        host_sw,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output ctx_t        active,
  output logic [15:0] switch_count,
  output logic [15:0] n_host_switch
);
  logic        f_valid, f_ready, v_valid, v_ready, v_sw, ack;
  logic [15:0] f_data, v_data, n_fsm, n_data;
  ctx_t        v_ctx;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count, out_count;

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(in_count));

  ctx_router u_router (
    .clk, .rst_n, .mode, .host_ctx, .host_sw, .fsm_ctx('0), .fsm_sw(1'b0),
    .data_ctx('0), .data_req(1'b0), .ctx(v_ctx), .ctx_sw(v_sw), .data_ack(ack),
    .n_host(n_host_switch), .n_fsm, .n_data);

  csrc_video #(.W(W), .H(H)) u_csrc_a (
    .clk, .rst_n, .ctx(v_ctx), .ctx_sw(v_sw), .active, .switch_count,
    .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(v_valid), .out_ready(v_ready), .out_data(v_data));

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .in_valid(v_valid), .in_ready(v_ready), .in_data(v_data),
    .out_valid, .out_ready, .out_data, .count(out_count));
endmodule
