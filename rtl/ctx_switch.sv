// ctx_switch: the global context lines of one CSRC device.
//
// Every configurable resource of the device has one configuration bit per
// context; the global context lines select which of them is in force. This
// block is the register that drives those lines: when ctx_sw is high at a
// clock edge the context number on ctx becomes the active context, so a
// switch completes in one clock. switched pulses for one clock after each
// switch and switch_count counts them, for observation.
//
// The one-clock switch follows the platform description; the reset to
// context 0 and the counter are this design's choices.
module ctx_switch #(
  parameter int unsigned NUM_CTX = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(NUM_CTX)-1:0] ctx,
  input  logic                       ctx_sw,
  output logic [$clog2(NUM_CTX)-1:0] active,
  output logic                       switched,
  output logic [15:0]                switch_count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active       <= '0;
      switched     <= 1'b0;
      switch_count <= '0;
    end else begin
      switched <= ctx_sw;
      if (ctx_sw) begin
        active       <= ctx;
        switch_count <= switch_count + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ctx_sw |-> 32'(ctx) < NUM_CTX);
endmodule
