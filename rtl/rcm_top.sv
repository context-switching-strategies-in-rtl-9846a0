// rcm_top: the reconfigurable computing board with its applications.
//
// A context-switching board carries two multi-context devices (CSRC A and
// CSRC B, four configuration planes each), a support FPGA that routes their
// context-switch control, and FIFOs to the host. Three applications are
// built on it, one per way of driving context switches, and stand side by
// side here, each with its own ports:
//
//   motion_*   motion detection: CSRC A runs difference, low-pass filter
//              and binary image stages as three contexts, sequenced by the
//              host-programmable FSM (FSM-driven switching).
//   enc_*      packet encryption: CSRC A's controller context reads packet
//              headers and has CSRC B switched to the channel's encryptor
//              (data-driven switching).
//   video_*    video filters: CSRC A holds pass-through, fading delay and
//              difference filters as contexts; the host picks one by a
//              context-switch request (host-driven switching).
//   cell_*     one context switching logic cell of the device fabric, with
//              its configuration load and context lines brought out.
//
// The host, its processor and the video capture are outside; their FIFO
// and register ports are the top's ports. All ports are synchronous to clk;
// rst_n is an active-low asynchronous reset.
module rcm_top
  import csrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // motion detection
  input  ctx_src_e    motion_mode,
  input  ctx_t        motion_host_ctx,
  input  logic        motion_host_sw,
  input  logic        motion_host_we,
  input  logic [7:0]  motion_host_addr,
  input  logic [15:0] motion_host_wdata,
  input  logic        motion_in_valid,
  output logic        motion_in_ready,
  input  logic [15:0] motion_in_data,
  output logic        motion_out_valid,
  input  logic        motion_out_ready,
  output logic [15:0] motion_out_data,
  output ctx_t        motion_active,
  output logic [3:0]  motion_fsm_state,
  output logic [15:0] motion_switch_count,
  output logic [15:0] motion_n_fsm_switch,
  output logic [15:0] motion_n_host_switch,
  // packet encryption
  input  ctx_src_e    enc_mode,
  input  ctx_t        enc_host_ctx,
  input  logic        enc_host_sw,
  input  logic        enc_in_valid,
  output logic        enc_in_ready,
  input  logic [7:0]  enc_in_data,
  output logic        enc_out_valid,
  input  logic        enc_out_ready,
  output logic [7:0]  enc_out_data,
  output ctx_t        enc_active,
  output logic [15:0] enc_pkt_count,
  output logic [15:0] enc_switch_count,
  output logic [15:0] enc_n_data_switch,
  // video filters
  input  ctx_src_e    video_mode,
  input  ctx_t        video_host_ctx,
  input  logic        video_host_sw,
  input  logic        video_in_valid,
  output logic        video_in_ready,
  input  logic [15:0] video_in_data,
  output logic        video_out_valid,
  input  logic        video_out_ready,
  output logic [15:0] video_out_data,
  output ctx_t        video_active,
  output logic [15:0] video_switch_count,
  output logic [15:0] video_n_host_switch,
  // fabric cell
  input  logic        cell_cfg_en,
  input  ctx_t        cell_cfg_ctx,
  input  logic        cell_cfg_bit,
  input  ctx_t        cell_ctx,
  input  logic        cell_ctx_sw,
  input  logic [3:0]  cell_in,
  input  logic        cell_ff_en,
  input  logic        cell_t_en,
  output logic        cell_y,
  output logic        cell_y_oe,
  output ctx_t        cell_active
);
  motion_system u_motion (
    .clk, .rst_n, .mode(motion_mode), .host_ctx(motion_host_ctx), .host_sw(motion_host_sw),
    .host_we(motion_host_we), .host_addr(motion_host_addr), .host_wdata(motion_host_wdata),
    .in_valid(motion_in_valid), .in_ready(motion_in_ready), .in_data(motion_in_data),
    .out_valid(motion_out_valid), .out_ready(motion_out_ready), .out_data(motion_out_data),
    .active(motion_active), .fsm_state(motion_fsm_state), .switch_count(motion_switch_count),
    .n_fsm_switch(motion_n_fsm_switch), .n_host_switch(motion_n_host_switch));

  enigma_system u_enc (
    .clk, .rst_n, .mode(enc_mode), .host_ctx(enc_host_ctx), .host_sw(enc_host_sw),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_out_data),
    .active(enc_active), .pkt_count(enc_pkt_count), .switch_count(enc_switch_count),
    .n_data_switch(enc_n_data_switch));

  video_system u_video (
    .clk, .rst_n, .mode(video_mode), .host_ctx(video_host_ctx), .host_sw(video_host_sw),
    .in_valid(video_in_valid), .in_ready(video_in_ready), .in_data(video_in_data),
    .out_valid(video_out_valid), .out_ready(video_out_ready), .out_data(video_out_data),
    .active(video_active), .switch_count(video_switch_count),
    .n_host_switch(video_n_host_switch));

  cslc #(.NUM_CTX(NUM_CTX)) u_cell (
    .clk, .rst_n, .cfg_en(cell_cfg_en), .cfg_ctx(cell_cfg_ctx), .cfg_bit(cell_cfg_bit),
    .ctx(cell_ctx), .ctx_sw(cell_ctx_sw), .in(cell_in), .ff_en(cell_ff_en), .t_en(cell_t_en),
    .y(cell_y), .y_oe(cell_y_oe), .active(cell_active));
endmodule
