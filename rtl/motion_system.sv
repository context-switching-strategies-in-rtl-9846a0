// motion_system: motion detection with FSM-driven context switching.
//
// Video frames (160x120, 8-bit, two pixels per word) enter through the
// input FIFO. CSRC A holds the difference, low-pass filter and binary image
// stages in three contexts. The host-programmable FSM in the support FPGA
// sequences them: it switches CSRC A to a stage, raises Calc, waits for
// Done, and moves on; the binary image leaves through the output FIFO. The
// host loads the FSM table over host_we/host_addr/host_wdata before setting
// it running (see host_fsm for the map). mode selects who drives the
// context lines: SRC_FSM for this application, SRC_HOST to switch them
// from the host instead.
//
// Pins between FPGA and CSRC A (16 each way): towards the device, pin 0-1
// Ctx, pin 2 CtxSw, pin 3 Calc; from the device, pin 0 Done, pin 1 the
// input FIFO holding data, pin 2 the output FIFO having room. Which FSM
// output bit drives which pin is set by the FSM's output map.
//
// The stages, their contexts and the FSM control follow the application
// description; the pin assignment and FIFO choices are this design's own.
module motion_system
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
  input  logic        host_we,
  input  logic [7:0]  host_addr,
  input  logic [15:0] host_wdata,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output ctx_t        active,
  output logic [3:0]  fsm_state,
  output logic [15:0] switch_count,
  output logic [15:0] n_fsm_switch,
  output logic [15:0] n_host_switch
);
  logic        f_valid, f_ready, b_valid, b_ready;
  logic [15:0] f_data, b_data;
  logic [15:0] pin_to_dev, pin_from_dev;
  logic [7:0]  fsm_out;
  logic        running, done, a_sw, ack;
  ctx_t        a_ctx;
  logic [15:0] n_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count, out_count;

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(in_count));

  host_fsm #(.S_BITS(4), .I_BITS(2), .O_BITS(8), .PINS(16)) u_fsm (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata,
    .pin_in(pin_from_dev), .pin_out(pin_to_dev),
    .state(fsm_state), .outputs(fsm_out), .running);

  assign pin_from_dev = {13'd0, b_ready, f_valid, done};

  ctx_router u_router (
    .clk, .rst_n, .mode, .host_ctx, .host_sw,
    .fsm_ctx(pin_to_dev[1:0]), .fsm_sw(pin_to_dev[2]),
    .data_ctx('0), .data_req(1'b0), .ctx(a_ctx), .ctx_sw(a_sw), .data_ack(ack),
    .n_host(n_host_switch), .n_fsm(n_fsm_switch), .n_data);

  csrc_motion #(.W(W), .H(H)) u_csrc_a (
    .clk, .rst_n, .ctx(a_ctx), .ctx_sw(a_sw), .calc(pin_to_dev[3]), .done,
    .active, .switch_count,
    .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data));

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid, .out_ready, .out_data, .count(out_count));
endmodule
