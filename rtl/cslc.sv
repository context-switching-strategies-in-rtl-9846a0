// cslc: context switching logic cell, the computing cell of a CSRC device.
//
// The cell is a four-input lookup table followed by a flip-flop, an output
// select (lookup table or flip-flop) and an output driver with enable. Every
// configurable item has one configuration word per context; the active
// context (from the device's global context lines) selects which one is in
// force, so the cell becomes a different circuit in one clock.
//
// Per-context configuration word (20 bits, shifted in MSB first):
//   [19:4] lut      truth table, output for inputs i is lut[i]
//   [3]    reg_out  1: drive the flip-flop value, 0: the table output
//   [2]    share    on leaving this context, copy its flip-flop to public
//   [1]    use_pub  on entering this context, load its flip-flop from public
//   [0]    oe       enable the output driver (together with t_en)
// A context is loaded serially with cfg_en/cfg_ctx/cfg_bit; any context,
// the active one included, can be loaded while the cell runs.
//
// Flip-flop state: one private register per context and one public
// register. With ff_en high the active context's private register takes
// the table output. On a context switch (ctx_sw high at a clock edge, new
// context on ctx) the leaving context's value goes to the public register
// if it shares, and the entering context starts from the public value if
// it uses it, from its own private value otherwise; no capture happens in
// that clock. The driver is modelled as y plus its enable y_oe.
//
// The table, flip-flop, output select, driver, four planes, serial
// per-context loading and private/public registers follow the device
// description. The bit layout, the switch-time transfer rules and the
// shared enable pin are this design's reading. The optional RAM path and
// the carry logic (chained every four bits) are not modelled.
module cslc #(
  parameter int unsigned NUM_CTX = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration load
  input  logic                       cfg_en,
  input  logic [$clog2(NUM_CTX)-1:0] cfg_ctx,
  input  logic                       cfg_bit,
  // global context lines
  input  logic [$clog2(NUM_CTX)-1:0] ctx,
  input  logic                       ctx_sw,
  // cell signals
  input  logic [3:0]                 in,
  input  logic                       ff_en,
  input  logic                       t_en,
  output logic                       y,
  output logic                       y_oe,
  output logic [$clog2(NUM_CTX)-1:0] active
);
  typedef struct packed {
    logic [15:0] lut;
    logic        reg_out;
    logic        share;
    logic        use_pub;
    logic        oe;
  } cfg_t;

  cfg_t               plane [NUM_CTX];
  logic [NUM_CTX-1:0] priv;
  logic               pub, pub_next, lut_out;
  cfg_t               cur;

  assign cur     = plane[active];
  assign lut_out = cur.lut[in];
  assign y       = cur.reg_out ? priv[active] : lut_out;
  assign y_oe    = cur.oe && t_en;
  assign pub_next = cur.share ? priv[active] : pub;

  // Configuration planes: no reset, they are loaded before use
  always_ff @(posedge clk) begin
    if (cfg_en) plane[cfg_ctx] <= {plane[cfg_ctx][$bits(cfg_t)-2:0], cfg_bit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      priv   <= '0;
      pub    <= 1'b0;
    end else if (ctx_sw) begin
      active <= ctx;
      pub    <= pub_next;
      if (plane[ctx].use_pub) priv[ctx] <= pub_next;
    end else if (ff_en) begin
      priv[active] <= lut_out;
    end
  end
endmodule
