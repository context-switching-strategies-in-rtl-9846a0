// tb_pkt_ctrl: feeds random packets (random channel, lengths 0..40, random
// gaps) to the controller, answers its context requests after a random
// delay like the support FPGA would, and makes the encryptor side busy at
// random. Checks: each packet raises exactly one request with its channel,
// only while the device is idle; no data passes before the acknowledge;
// the forwarded bytes are exactly the data bytes (headers stripped); the
// down-counter ends each packet; the packet counter.
module tb_pkt_ctrl;
  import csrc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, ctx_req, ctx_ack = 0, dev_idle = 1;
  logic [7:0] in_data = 0, out_data;
  ctx_t ctx_req_ctx;
  logic [15:0] pkt_count, remaining;
  int checks = 0, failures = 0;
  logic [7:0] in_q[$], exp_q[$];
  ctx_t ch_q[$];
  logic granted = 0;
  int n_req = 0, n_idle_wait = 0, n_zero = 0;
  localparam int NPKT = 150;

  pkt_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // build the byte stream
  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int len; ctx_t ch;
      len = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 40);
      if (len == 0) n_zero++;
      ch  = ctx_t'($urandom);
      ch_q.push_back(ch);
      in_q.push_back(8'($urandom)); in_q.push_back(8'($urandom));
      in_q.push_back({6'($urandom), ch});
      in_q.push_back(8'(len)); in_q.push_back(8'(len >> 8));
      for (int i = 0; i < len; i++) begin
        logic [7:0] b; b = 8'($urandom);
        in_q.push_back(b); exp_q.push_back(b);
      end
    end
  end

  // source: one byte offered at a time, with gaps
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready_q) begin void'(in_q.pop_front()); in_valid = 0; end
      if (!in_valid && in_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        in_valid = 1; in_data = in_q[0];
      end
      out_ready = ($urandom_range(0, 4) != 0);
      dev_idle  = ($urandom_range(0, 2) != 0);
    end
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  // support FPGA model and checks, sampled before each rising edge
  int ack_delay = -1;
  logic idle_q = 0;
  always @(posedge clk) idle_q <= dev_idle;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ctx_req) begin
        n_req++;
        check(ch_q.size() > 0 && ctx_req_ctx == ch_q[0], "requested channel");
        check(idle_q, "request only after the device was idle");
        if (ch_q.size() > 0) void'(ch_q.pop_front());
        ack_delay <= $urandom_range(0, 3);
      end
      if (!dev_idle && dut.st == dut.S_WAIT_IDLE) n_idle_wait++;
      if (ack_delay == 0) begin ctx_ack <= 1; granted <= 1; ack_delay <= -1; end
      else begin ctx_ack <= 0; if (ack_delay > 0) ack_delay <= ack_delay - 1; end
      if (ctx_req) granted <= 0;
      if (out_valid && out_ready) begin
        check(granted, "data only after the acknowledge");
        check(exp_q.size() > 0 && out_data == exp_q[0], "forwarded data byte");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (in_q.size() == 0);
    repeat (50) @(negedge clk);
    check(exp_q.size() == 0, "all data forwarded");
    check(n_req == NPKT && pkt_count == 16'(NPKT), "one request per packet");
    check(dut.st == dut.S_HDR && remaining == 0, "back to header state");
    check(n_idle_wait > 0 && n_zero > 0, "waits for idle and empty packets exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
