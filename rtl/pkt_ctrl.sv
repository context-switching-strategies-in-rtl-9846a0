// pkt_ctrl: packet controller context of CSRC A (data-driven switching).
//
// A packet is a 5-byte header followed by its data bytes. The header bytes
// arrive in this order: two unused bytes, the channel (context) number,
// the packet length low byte, the packet length high byte. The controller
// reads the header, waits until the encryptor device is idle, raises
// ctx_req for one clock with the channel number towards the support FPGA,
// and waits for ctx_ack, by which the encryptor device has been told to
// switch. It then passes the data bytes through to the encryptor while a
// down-counter loaded with the length counts them; when it reaches zero the
// controller returns to reading a header. A packet of length 0 has no data.
// The header itself is not forwarded.
//
// Streams use valid/ready handshakes; data passes combinationally (no
// added latency) while in the pass state. pkt_count counts packets started.
//
// The header fields, the down-counter and the request through the support
// FPGA follow the application description; the byte order of the header
// fields (as printed in the packet format), the wait for idle, the
// acknowledge and the use of the low two bits of the channel byte are this
// design's choices.
module pkt_ctrl
  import csrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output ctx_t        ctx_req_ctx,
  output logic        ctx_req,
  input  logic        ctx_ack,
  input  logic        dev_idle,
  output logic [15:0] pkt_count,
  output logic [15:0] remaining
);
  typedef enum logic [2:0] {S_HDR, S_WAIT_IDLE, S_REQ, S_WAIT_ACK, S_PASS} st_e;
  st_e        st;
  logic [2:0] hcnt;
  ctx_t       chan;

  assign in_ready    = (st == S_HDR) || (st == S_PASS && out_ready);
  assign out_valid   = (st == S_PASS) && in_valid;
  assign out_data    = in_data;
  assign ctx_req     = (st == S_REQ);
  assign ctx_req_ctx = chan;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_HDR;
      hcnt      <= '0;
      chan      <= '0;
      remaining <= '0;
      pkt_count <= '0;
    end else begin
      unique case (st)
        S_HDR: if (in_valid) begin
          unique case (hcnt)
            3'd2: chan <= in_data[CTX_BITS-1:0];
            3'd3: remaining[7:0]  <= in_data;
            3'd4: remaining[15:8] <= in_data;
            default: ;
          endcase
          if (hcnt == 3'd4) begin
            hcnt <= '0;
            st   <= S_WAIT_IDLE;
          end else hcnt <= hcnt + 1'b1;
        end
        S_WAIT_IDLE: if (dev_idle) st <= S_REQ;
        S_REQ: begin
          st        <= S_WAIT_ACK;
          pkt_count <= pkt_count + 1'b1;
        end
        S_WAIT_ACK: if (ctx_ack) st <= (remaining == 0) ? S_HDR : S_PASS;
        S_PASS: if (in_valid && out_ready) begin
          remaining <= remaining - 1'b1;
          if (remaining == 16'd1) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end
endmodule
