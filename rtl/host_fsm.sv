// host_fsm: host-programmable finite state machine of the support FPGA.
//
// The state machine is a table in memory. The present state and the input
// bits form the address of a table entry; the entry holds the next state and
// the output bits. On every clock while running, state and outputs are loaded
// from the entry selected by {state, inputs}, so an entry carries the outputs
// of the state it leads to (Moore outputs, one clock after the state is
// decided). Each input bit is taken from any of the PINS interface pins
// coming back from the CSRC, chosen by an input-select word; each interface
// pin going to the CSRC can be driven by any output bit, chosen by an
// output-map word. The host writes table, selects and map through a simple
// register port (one write per clock, no read-back):
//
//   0x00 + {state, inputs}   table entry: wdata[O_BITS-1:0] = outputs,
//                            wdata[O_BITS+S_BITS-1:O_BITS] = next state
//   0x40 + i                 input i select: wdata[3:0] = pin number
//   0x50 + p                 pin p map: wdata[4] = drive, wdata[2:0] = output bit
//   0x60                     control: wdata[0] = run, wdata[1] = state to 0
//
// The table-in-memory structure and the pin selection follow the platform
// description. The register map, the sizes, registering the outputs and the
// reset to state 0 are this design's choices.
module host_fsm #(
  parameter int unsigned S_BITS = 4,
  parameter int unsigned I_BITS = 2,
  parameter int unsigned O_BITS = 8,
  parameter int unsigned PINS   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // host register port
  input  logic                host_we,
  input  logic [7:0]          host_addr,
  input  logic [15:0]         host_wdata,
  // interface pins
  input  logic [PINS-1:0]     pin_in,
  output logic [PINS-1:0]     pin_out,
  // observation
  output logic [S_BITS-1:0]   state,
  output logic [O_BITS-1:0]   outputs,
  output logic                running
);
  localparam int unsigned TAB_AW = S_BITS + I_BITS;
  localparam int unsigned TAB_N  = 1 << TAB_AW;
  localparam int unsigned ENT_W  = S_BITS + O_BITS;

  initial begin
    assert (TAB_N <= 64) else $error("host_fsm: table larger than its address window");
    assert (PINS <= 16 && O_BITS <= 8) else $error("host_fsm: select fields too narrow");
  end

  logic [ENT_W-1:0]  table_mem [TAB_N];
  logic [3:0]        in_sel  [I_BITS];
  logic [PINS-1:0]   map_en;
  logic [2:0]        map_bit [PINS];
  logic [I_BITS-1:0] inputs;
  logic [ENT_W-1:0]  entry;

  // Table writes (no reset: the host loads it before setting run)
  always_ff @(posedge clk) begin
    if (host_we && host_addr < 8'(TAB_N))
      table_mem[host_addr[TAB_AW-1:0]] <= host_wdata[ENT_W-1:0];
  end

  // Selects, map and control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < I_BITS; i++) in_sel[i] <= '0;
      for (int p = 0; p < PINS; p++) map_bit[p] <= '0;
      map_en  <= '0;
      running <= 1'b0;
    end else if (host_we) begin
      for (int i = 0; i < I_BITS; i++)
        if (host_addr == 8'h40 + 8'(i)) in_sel[i] <= host_wdata[3:0];
      for (int p = 0; p < PINS; p++)
        if (host_addr == 8'h50 + 8'(p)) begin
          map_en[p]  <= host_wdata[4];
          map_bit[p] <= host_wdata[2:0];
        end
      if (host_addr == 8'h60) running <= host_wdata[0];
    end
  end

  always_comb begin
    for (int i = 0; i < I_BITS; i++) inputs[i] = pin_in[in_sel[i]];
  end

  assign entry = table_mem[{state, inputs}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      outputs <= '0;
    end else if (host_we && host_addr == 8'h60 && host_wdata[1]) begin
      state   <= '0;
      outputs <= '0;
    end else if (running) begin
      state   <= entry[ENT_W-1:O_BITS];
      outputs <= entry[O_BITS-1:0];
    end
  end

  always_comb begin
    for (int p = 0; p < PINS; p++) pin_out[p] = map_en[p] & outputs[map_bit[p]];
  end
endmodule
