// tb_video_system: the host-driven demonstration. Six small frames go
// through the FIFOs; before each frame the host selects a filter (pass with
// one-frame delay, delay with fading, difference) through the router. Each
// output frame is compared with a frame-level model of the three filters.
// Checks that each host request switched the device.
module tb_video_system;
  import csrc_pkg::*;
  localparam int W = 16, H = 4, NPIX = W * H, WORDS = NPIX / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_src_e mode = SRC_HOST;
  ctx_t host_ctx = 0, active;
  logic host_sw = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_data = 0, out_data, switch_count, n_host_switch;
  int checks = 0, failures = 0;
  logic [15:0] exp_q[$];

  video_system #(.W(W), .H(H), .FIFO_DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], "filtered word");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    logic [7:0] S [NPIX];
    logic [7:0] cur [NPIX];
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (S[i]) S[i] = 8'($urandom);
    for (int w = 0; w < WORDS; w++) dut.u_csrc_a.u_ram.mem[w] = {S[2*w + 1], S[2*w]};
    for (int fr = 0; fr < 6; fr++) begin
      ctx_t f;
      f = ctx_t'(fr % 3);
      foreach (cur[i]) cur[i] = 8'($urandom);
      // expected frame and new store
      for (int w = 0; w < WORDS; w++) begin
        logic [15:0] e;
        for (int p = 0; p < 2; p++) begin
          int i; i = 2 * w + p;
          case (f)
            2'b01: begin e[8*p +: 8] = S[i]; S[i] = 8'((int'(S[i]) + int'(cur[i])) / 2); end
            2'b10: begin e[8*p +: 8] = (cur[i] > S[i]) ? cur[i] - S[i] : S[i] - cur[i]; S[i] = cur[i]; end
            default: begin e[8*p +: 8] = S[i]; S[i] = cur[i]; end
          endcase
        end
        exp_q.push_back(e);
      end
      // the host switches the filter once the previous frame has left
      wait (exp_q.size() == WORDS);
      @(negedge clk); host_ctx = f; host_sw = 1;
      @(negedge clk); host_sw = 0;
      check(active == f, "host request switched the filter");
      for (int w = 0; w < WORDS; w++) begin
        in_valid = 1; in_data = {cur[2*w + 1], cur[2*w]};
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      in_valid = 0;
      wait (exp_q.size() == 0);
    end
    check(n_host_switch == 16'd6 && switch_count == 16'd6, "six host-driven switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
