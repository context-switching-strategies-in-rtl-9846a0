// tb_motion_system: loads the motion-detection control table into the
// FSM over the host port, sets it running, and streams four frames through
// the input FIFO; the output FIFO must deliver each frame's binary image
// (reference model). Counts FSM-driven context switches (3 per frame),
// clocks the FSM waited for Done, input-FIFO-full and output stalls.
module tb_motion_system;
  import csrc_pkg::*;
  import motion_ref_pkg::*;
  import motion_fsm_table_pkg::*;
  localparam int W = 16, H = 8, WORDS = W * H / 2, NFR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_src_e mode = SRC_FSM;
  ctx_t host_ctx = 0, active;
  logic host_sw = 0, host_we = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] host_addr = 0;
  logic [15:0] host_wdata = 0, in_data = 0, out_data;
  logic [3:0] fsm_state;
  logic [15:0] switch_count, n_fsm_switch, n_host_switch;
  int checks = 0, failures = 0;
  logic [15:0] in_q[$], exp_q[$];
  int n_wait_done = 0, n_in_full = 0, n_out_stall = 0;

  motion_system #(.W(W), .H(H), .FIFO_DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_data == exp_q[0], "binary output word");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      if ((fsm_state == DIFF || fsm_state == LPF || fsm_state == BIN) && !dut.done) n_wait_done++;
      if (in_valid && !in_ready) n_in_full++;
      if (dut.b_valid && !dut.b_ready) n_out_stall++;
    end
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready_q) begin void'(in_q.pop_front()); in_valid = 0; end
      if (!in_valid && in_q.size() > 0) begin in_valid = 1; in_data = in_q[0]; end
      out_ready = (($time / 4000) % 3 == 0) ? 1'b0 : 1'b1;
    end
  end

  initial begin
    frame_t prev, cur, b;
    prev = new[W * H]; cur = new[W * H];
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prev[i]) prev[i] = 8'($urandom_range(0, 80));
    for (int w = 0; w < WORDS; w++) dut.u_csrc_a.u_ram.mem[w] = {prev[2*w + 1], prev[2*w]};
    for (int fr = 0; fr < NFR; fr++) begin
      foreach (cur[i]) cur[i] = 8'($urandom_range(0, 80));
      b = bin(lpf(diff(cur, prev), W, H), 8'd16);
      for (int w = 0; w < WORDS; w++) begin
        in_q.push_back({cur[2*w + 1], cur[2*w]});
        exp_q.push_back({b[2*w + 1], b[2*w]});
      end
      prev = cur;
    end
    for (int a = 0; a < 64; a++) wr(8'(a), table_word(a));
    wr(8'h40, 16'd0);                                    // Done on pin 0
    for (int p = 0; p < 4; p++) wr(8'h50 + 8'(p), 16'h10 | 16'(p));
    wr(8'h60, 16'h0001);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(n_fsm_switch >= 3 * NFR && n_host_switch == 0, "FSM-driven switches");
    check(n_wait_done > 0, "FSM waited for Done");
    check(n_in_full > 0, "input FIFO became full");
    check(n_out_stall > 0, "output FIFO back-pressure");
    $display("fsm_switches=%0d done_waits=%0d in_full=%0d out_stalls=%0d",
             n_fsm_switch, n_wait_done, n_in_full, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
