// csrc_pkg: types and constants shared by the context-switching board model.
//
// A CSRC device holds four configuration planes ("contexts"); exactly one is
// active and a new one becomes active on the clock edge at which the
// context-switch strobe (CtxSw) is seen. The motion-detection application
// places its three stages in contexts 00, 01 and 10, the codes its control
// state machine drives on the Ctx lines. The encryption application places
// one encryptor per network channel in each of the four contexts.
//
// The frame size (160x120, 8-bit grey, two pixels per 16-bit word) and the
// four contexts follow the platform description. The per-channel keys and
// nibble substitution tables are this design's own values: the original
// rotor settings were not published.
package csrc_pkg;

  localparam int unsigned NUM_CTX   = 4;   // configuration planes per device
  localparam int unsigned CTX_BITS  = 2;
  typedef logic [CTX_BITS-1:0] ctx_t;

  // Motion-detection context codes (Ctx lines of the control FSM)
  localparam ctx_t CTX_DIFF = 2'b00;
  localparam ctx_t CTX_LPF  = 2'b01;
  localparam ctx_t CTX_BIN  = 2'b10;

  // Where a context-switch command comes from (support-FPGA routing)
  typedef enum logic [1:0] {
    SRC_HOST = 2'd0,   // host-driven: user request from the host
    SRC_FSM  = 2'd1,   // FSM-driven: host-programmable state machine
    SRC_DATA = 2'd2    // data-driven: request raised by a CSRC from its data
  } ctx_src_e;

  // Video frame geometry
  localparam int unsigned FRAME_W = 160;
  localparam int unsigned FRAME_H = 120;

  // Encryption channels: rotor keys (3 bytes) and nibble tables (16 x 4 bit,
  // entry i at bits [4*i+3:4*i]) of the encryptor in each context.
  typedef logic [7:0]  key_t;
  typedef logic [63:0] sbox_t;
  localparam key_t  CH_KEY0  [NUM_CTX] = '{8'h17, 8'h5A, 8'hC3, 8'h21};
  localparam key_t  CH_KEY1  [NUM_CTX] = '{8'h8E, 8'h04, 8'h39, 8'hF0};
  localparam key_t  CH_KEY2  [NUM_CTX] = '{8'h42, 8'hB7, 8'h6D, 8'h99};
  localparam sbox_t CH_SBOXH [NUM_CTX] = '{64'h2E9C_4B07_D15A_63F8, 64'h7A1F_03D6_95BE_4C28,
                                           64'hC05B_E816_2F3A_D497, 64'h94D2_0F7B_3C61_E8A5};
  localparam sbox_t CH_SBOXL [NUM_CTX] = '{64'h5D08_F3A6_1C7E_942B, 64'hB294_6E0D_F53A_C178,
                                           64'h3F7C_1259_AE08_D46B, 64'h16E5_9A3C_DF80_247B};

endpackage
