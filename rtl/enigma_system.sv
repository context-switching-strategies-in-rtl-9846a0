// enigma_system: multi-channel packet encryption with data-driven context
// switching.
//
// Packets enter through the input FIFO. The controller context on CSRC A
// reads each header and asks the support FPGA's context router to switch
// CSRC B to the packet's channel; CSRC B holds one encryptor per channel in
// its four contexts. The data bytes then flow through the controller into
// the active encryptor and out through the output FIFO. mode selects the
// router's source: SRC_DATA for this application; with another mode the
// controller's requests are not served and it waits.
//
// The partition (controller on one device, encryptors on the other, context
// control through the support FPGA) follows the application description;
// FIFO width, depth and handshakes are this design's choices.
module enigma_system
  import csrc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_src_e    mode,
  input  ctx_t        host_ctx,
  input  logic        host_sw,
  // host side of the FIFOs
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  // observation
  output ctx_t        active,
  output logic [15:0] pkt_count,
  output logic [15:0] switch_count,
  output logic [15:0] n_data_switch
);
  logic       f_valid, f_ready, c_valid, c_ready, e_valid, e_ready;
  logic [7:0] f_data, c_data, e_data;
  ctx_t       req_ctx, b_ctx;
  logic       req, ack, b_sw, b_idle;
  logic [15:0] remaining, n_host, n_fsm;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count, out_count;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(in_count));

  pkt_ctrl u_ctrl (
    .clk, .rst_n, .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data),
    .ctx_req_ctx(req_ctx), .ctx_req(req), .ctx_ack(ack), .dev_idle(b_idle),
    .pkt_count, .remaining);

  ctx_router u_router (
    .clk, .rst_n, .mode, .host_ctx, .host_sw, .fsm_ctx('0), .fsm_sw(1'b0),
    .data_ctx(req_ctx), .data_req(req), .ctx(b_ctx), .ctx_sw(b_sw), .data_ack(ack),
    .n_host, .n_fsm, .n_data(n_data_switch));

  csrc_enigma u_csrc_b (
    .clk, .rst_n, .ctx(b_ctx), .ctx_sw(b_sw), .active, .switch_count, .idle(b_idle),
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(e_valid), .out_ready(e_ready), .out_data(e_data));

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .in_valid(e_valid), .in_ready(e_ready), .in_data(e_data),
    .out_valid, .out_ready, .out_data, .count(out_count));
endmodule
