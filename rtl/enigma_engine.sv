// enigma_engine: pipelined Enigma-like byte encryptor (one channel).
//
// Three rotors of 256 slots each are modelled by addition modulo 256: rotor
// n turns byte x into x + KEYn + offset_n. The byte goes through rotors 0,
// 1, 2, then back through copies of rotors 2, 1, 0 (the return path of the
// rotor machine, laid out as further pipeline stages), and the result is
// scrambled nibble-wise: the high nibble through table SBOX_HI, the low
// nibble through SBOX_LO (16 entries of 4 bits, entry i at bits 4i+3..4i).
//
// The rotor offsets turn like an odometer: offset_0 advances by one for
// every byte accepted, offset_1 when offset_0 wraps from 255 to 0, offset_2
// when offset_1 wraps. Each byte carries the offsets it was accepted with
// down the pipeline, so the repeated rotors use the same positions as the
// first ones. Offsets start at 0 after reset.
//
// Timing: seven pipeline stages, one byte per clock, latency 7 clocks from
// acceptance (in_valid && in_ready) to out_valid. When out_valid is high
// and out_ready low the whole pipeline holds. While en is low (another
// context active) the pipeline and the offsets hold their values. idle is
// high when no byte is inside the pipeline.
//
// The additive rotors, the repeated rotors in reverse order, the stepping
// and the nibble tables follow the application description; the key and
// table values, the absence of a reflector stage, the pipeline depth and
// the handshake are this design's choices.
module enigma_engine #(
  parameter logic [7:0]  KEY0    = 8'h00,
  parameter logic [7:0]  KEY1    = 8'h00,
  parameter logic [7:0]  KEY2    = 8'h00,
  parameter logic [63:0] SBOX_HI = 64'hFEDC_BA98_7654_3210,
  parameter logic [63:0] SBOX_LO = 64'hFEDC_BA98_7654_3210
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       idle,
  output logic [23:0] position
);
  localparam int NST = 7;

  typedef struct packed {
    logic        valid;
    logic [7:0]  data;
    logic [23:0] pos;    // {offset_2, offset_1, offset_0}
  } stage_t;

  stage_t st [NST];
  logic   adv;
  stage_t nxt [NST];

  function automatic logic [3:0] sbox(input logic [63:0] tab, input logic [3:0] i);
    return tab[4*i +: 4];
  endfunction

  assign adv       = en && !(st[NST-1].valid && !out_ready);
  assign in_ready  = adv;
  assign out_valid = en && st[NST-1].valid;
  assign out_data  = st[NST-1].data;

  always_comb begin
    idle = 1'b1;
    for (int i = 0; i < NST; i++) if (st[i].valid) idle = 1'b0;
  end

  // Next stage contents
  always_comb begin
    nxt[0].valid = in_valid;
    nxt[0].pos   = position;
    nxt[0].data  = in_data + KEY0 + position[7:0];
    for (int i = 1; i < NST; i++) begin
      nxt[i].valid = st[i-1].valid;
      nxt[i].pos   = st[i-1].pos;
    end
    nxt[1].data = st[0].data + KEY1 + st[0].pos[15:8];
    nxt[2].data = st[1].data + KEY2 + st[1].pos[23:16];
    nxt[3].data = st[2].data + KEY2 + st[2].pos[23:16];
    nxt[4].data = st[3].data + KEY1 + st[3].pos[15:8];
    nxt[5].data = st[4].data + KEY0 + st[4].pos[7:0];
    nxt[6].data = {sbox(SBOX_HI, st[5].data[7:4]), sbox(SBOX_LO, st[5].data[3:0])};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NST; i++) st[i] <= '0;
      position <= '0;
    end else if (adv) begin
      for (int i = 0; i < NST; i++) st[i] <= nxt[i];
      if (in_valid) position <= position + 1'b1;
    end
  end
endmodule
