// tb_enigma_system: end-to-end packet encryption. Random packets for the
// four channels go into the input FIFO; the output FIFO must deliver, in
// order, the data bytes of every packet encrypted with its channel's key
// stream (reference model, one byte counter per channel). A small FIFO
// depth and random output stalls make the FIFOs fill. Counts the
// mechanisms: data-driven switches, waits for the encryptor to drain,
// input-FIFO-full and output back-pressure; each must occur.
module tb_enigma_system;
  import csrc_pkg::*;
  import enigma_ref_pkg::*;
  localparam int NPKT = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_src_e mode = SRC_DATA;
  ctx_t host_ctx = 0, active;
  logic host_sw = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = 0, out_data;
  logic [15:0] pkt_count, switch_count, n_data_switch;
  int checks = 0, failures = 0;
  logic [7:0] in_q[$], exp_q[$];
  int unsigned n_ch [NUM_CTX] = '{default: 0};
  int n_drain_wait = 0, n_in_full = 0, n_out_stall = 0;

  enigma_system #(.FIFO_DEPTH(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int len; ctx_t ch;
      len = $urandom_range(0, 60);
      ch  = ctx_t'($urandom);
      in_q.push_back(8'h00); in_q.push_back(8'h00); in_q.push_back({6'd0, ch});
      in_q.push_back(8'(len)); in_q.push_back(8'(len >> 8));
      for (int i = 0; i < len; i++) begin
        logic [7:0] b; b = 8'($urandom);
        in_q.push_back(b);
        exp_q.push_back(enc(b, n_ch[ch], CH_KEY0[ch], CH_KEY1[ch], CH_KEY2[ch],
                            CH_SBOXH[ch], CH_SBOXL[ch]));
        n_ch[ch]++;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_data == exp_q[0], "encrypted output byte");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      if (dut.u_ctrl.st == dut.u_ctrl.S_WAIT_IDLE && !dut.b_idle) n_drain_wait++;
      if (in_valid && !in_ready) n_in_full++;
      if (dut.e_valid && !dut.e_ready) n_out_stall++;
    end
  end

  // host side: push as fast as accepted, pop with phases of stalls
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready_q) begin void'(in_q.pop_front()); in_valid = 0; end
      if (!in_valid && in_q.size() > 0) begin in_valid = 1; in_data = in_q[0]; end
      out_ready = (($time / 3000) % 4 == 0) ? 1'b0 : ($urandom_range(0, 3) != 0);
    end
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (in_q.size() == 0 && exp_q.size() == 0);
    repeat (20) @(negedge clk);
    check(pkt_count == 16'(NPKT), "every packet processed");
    check(n_data_switch == 16'(NPKT) && switch_count == 16'(NPKT), "one data-driven switch per packet");
    check(n_drain_wait > 0, "controller waited for the encryptor to drain");
    check(n_in_full > 0, "input FIFO became full");
    check(n_out_stall > 0, "output back-pressure reached the encryptor");
    $display("switches=%0d drain_waits=%0d in_full=%0d out_stalls=%0d",
             n_data_switch, n_drain_wait, n_in_full, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
