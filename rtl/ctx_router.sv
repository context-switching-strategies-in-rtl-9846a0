// ctx_router: routing of context-switch control in the support FPGA.
//
// A CSRC's context lines (ctx, ctx_sw) can be driven from three places,
// chosen by mode: the host (host-driven switching, a user request), the
// host-programmable FSM (FSM-driven switching), or a request raised by a
// CSRC from the data it is processing (data-driven switching). Host and FSM
// commands already come from registers and go straight through, so the
// FSM's other output lines stay aligned with its CtxSw line. A data-driven
// request (data_req high for one clock with data_ctx) is sampled into a
// register: one clock later ctx_sw is pulsed with the requested context and
// data_ack is pulsed back to the requester; the device takes the new context
// on the clock after that. Requests from sources not selected by mode are
// ignored. The counters count the switches issued per source.
//
// The three sources follow the platform description; the one-clock
// registering of data requests, the acknowledge and the mode encoding are
// this design's choices.
module ctx_router
  import csrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_src_e    mode,
  input  ctx_t        host_ctx,
  input  logic        host_sw,
  input  ctx_t        fsm_ctx,
  input  logic        fsm_sw,
  input  ctx_t        data_ctx,
  input  logic        data_req,
  output ctx_t        ctx,
  output logic        ctx_sw,
  output logic        data_ack,
  output logic [15:0] n_host,
  output logic [15:0] n_fsm,
  output logic [15:0] n_data
);
  ctx_t data_ctx_q;
  logic data_sw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_ctx_q <= '0;
      data_sw_q  <= 1'b0;
    end else begin
      data_sw_q <= (mode == SRC_DATA) && data_req;
      if ((mode == SRC_DATA) && data_req) data_ctx_q <= data_ctx;
    end
  end

  always_comb begin
    unique case (mode)
      SRC_HOST: begin ctx = host_ctx;   ctx_sw = host_sw;   end
      SRC_FSM:  begin ctx = fsm_ctx;    ctx_sw = fsm_sw;    end
      SRC_DATA: begin ctx = data_ctx_q; ctx_sw = data_sw_q; end
      default:  begin ctx = '0;         ctx_sw = 1'b0;      end
    endcase
  end

  assign data_ack = data_sw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_host <= '0;
      n_fsm  <= '0;
      n_data <= '0;
    end else if (ctx_sw) begin
      if (mode == SRC_HOST) n_host <= n_host + 1'b1;
      if (mode == SRC_FSM)  n_fsm  <= n_fsm + 1'b1;
      if (mode == SRC_DATA) n_data <= n_data + 1'b1;
    end
  end
endmodule
