// csrc_enigma: CSRC B configured for multi-channel packet encryption.
//
// Each of the four contexts holds an encryptor with its own rotor keys and
// nibble tables, one per network channel. The context lines (ctx, ctx_sw)
// select the active encryptor in one clock; the byte stream goes into and
// comes out of the active one only. An inactive encryptor keeps its rotor
// positions and pipeline contents, so each channel continues its key stream
// where it stopped. idle is high when no encryptor holds a byte in its
// pipeline; a controller waits for it before switching, so that a packet's
// tail is not frozen inside a context that is being left.
//
// Four contexts, one encryptor per channel, follow the application
// description; the key and table values (in csrc_pkg) and the idle signal
// are this design's choices.
module csrc_enigma
  import csrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctx_t        ctx,
  input  logic        ctx_sw,
  output ctx_t        active,
  output logic [15:0] switch_count,
  output logic        idle,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data
);
  logic                switched;
  logic [NUM_CTX-1:0]  e_in_ready, e_out_valid, e_idle;
  logic [7:0]          e_out_data [NUM_CTX];
  logic [23:0]         e_pos [NUM_CTX];

  ctx_switch #(.NUM_CTX(NUM_CTX)) u_ctx (
    .clk, .rst_n, .ctx, .ctx_sw, .active, .switched, .switch_count);

  for (genvar g = 0; g < NUM_CTX; g++) begin : g_ctx
    enigma_engine #(
      .KEY0(CH_KEY0[g]), .KEY1(CH_KEY1[g]), .KEY2(CH_KEY2[g]),
      .SBOX_HI(CH_SBOXH[g]), .SBOX_LO(CH_SBOXL[g])
    ) u_eng (
      .clk, .rst_n, .en(active == ctx_t'(g)),
      .in_valid(in_valid && active == ctx_t'(g)), .in_ready(e_in_ready[g]), .in_data,
      .out_valid(e_out_valid[g]), .out_ready(out_ready && active == ctx_t'(g)),
      .out_data(e_out_data[g]), .idle(e_idle[g]), .position(e_pos[g]));
  end

  assign in_ready  = e_in_ready[active];
  assign out_valid = e_out_valid[active];
  assign out_data  = e_out_data[active];
  assign idle      = &e_idle;
endmodule
