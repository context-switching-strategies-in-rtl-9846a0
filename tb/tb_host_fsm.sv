// tb_host_fsm: loads the motion-detection control table into host_fsm and
// runs it with a random Done input, comparing state, outputs and mapped
// pins every clock with a reference model; then remaps an input and an
// output pin and checks the new routing.
module tb_host_fsm;
  import motion_fsm_table_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_we = 0;
  logic [7:0]  host_addr = 0;
  logic [15:0] host_wdata = 0;
  logic [15:0] pin_in = 0, pin_out;
  logic [3:0]  state;
  logic [7:0]  outputs;
  logic        running;
  int checks = 0, failures = 0;

  host_fsm dut (.*);

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] ref_s;
  logic [7:0] ref_o;
  int n_done_seen = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) wr(8'(a), table_word(a));
    wr(8'h40, 16'd0);           // input 0 <- pin 0 (Done)
    wr(8'h41, 16'd7);           // input 1 <- pin 7 (unused)
    for (int p = 0; p < 4; p++) wr(8'h50 + 8'(p), 16'h10 | 16'(p));
    check(state == 0 && pin_out == 0, "idle before run");
    wr(8'h60, 16'h0001);        // run (first step happens at the write edge + 1)
    ref_s = 0; ref_o = 0;
    // wr returns at a falling edge after the run bit is set; from the next
    // rising edge on the FSM steps once per clock
    for (int cyc = 0; cyc < 600; cyc++) begin
      pin_in[0] = ($urandom_range(0, 3) == 0);
      pin_in[7] = 1'($urandom_range(0, 1));
      if (pin_in[0] && (ref_s == DIFF || ref_s == LPF || ref_s == BIN)) n_done_seen++;
      ref_o = moore_out(next_state(ref_s, pin_in[0]));
      ref_s = next_state(ref_s, pin_in[0]);
      @(negedge clk);
      check(state == ref_s, $sformatf("state %0d exp %0d", state, ref_s));
      check(outputs == ref_o, "outputs");
      check(pin_out[3:0] == ref_o[3:0] && pin_out[15:4] == 0, "pins");
    end
    check(n_done_seen > 3, "Done exercised in wait states");
    // Remap: pin 9 <- Calc (bit 3), pin 0 unmapped; input 0 <- pin 12
    wr(8'h60, 16'h0002);        // stop and clear state
    wr(8'h50, 16'h0000);
    wr(8'h59, 16'h0013);
    wr(8'h40, 16'd12);
    pin_in = 0;
    wr(8'h60, 16'h0001);
    // IDLE -> I2D -> DIFF1 -> DIFF, then wait for Done on pin 12
    repeat (6) @(negedge clk);
    check(state == DIFF, "waiting in DIFF");
    check(pin_out[9] == 1'b1 && pin_out[0] == 1'b0 && pin_out[3] == 1'b1, "remapped Calc");
    pin_in[0] = 1;              // old input pin: must be ignored
    repeat (3) @(negedge clk);
    check(state == DIFF, "old pin ignored");
    pin_in[12] = 1;
    @(negedge clk);
    check(state == D2L, "new input pin used");
    check(outputs[1:0] == 2'b01 && pin_out[2:0] == 3'b100, "D2L outputs, pin 0 unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
