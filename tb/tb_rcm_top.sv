// tb_rcm_top: end-to-end run of the whole board at its default sizes
// (160x120 frames, 8K-word FIFOs), all three parts at once:
//   motion     the host loads the control table, two frames are streamed
//              and both binary images checked; then the FSM is stopped and
//              the host switches CSRC A itself (host-driven switching);
//   encryption 40 packets (150-600 bytes) on random channels, more than the
//              output FIFO holds,, every output byte checked;
//   video      three frames go through the filter device, the host
//              selecting pass-through, fading delay and difference in turn;
//              every output word is checked against a frame model;
//   cell       the fabric cell is configured as an XOR in context 0 and a
//              registered AND in context 1, and a value crosses a switch
//              through the public register.
// Each mechanism is counted and must occur: FSM-driven, host-driven and
// data-driven switches, waits for Done, waits for the encryptor to drain,
// output back-pressure, and public-register sharing.
module tb_rcm_top;
  import csrc_pkg::*;
  import motion_ref_pkg::*;
  import motion_fsm_table_pkg::*;
  import enigma_ref_pkg::*;
  localparam int W = FRAME_W, H = FRAME_H, WORDS = W * H / 2, NFR = 2, NPKT = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctx_src_e    motion_mode = SRC_FSM, enc_mode = SRC_DATA;
  ctx_t        motion_host_ctx = 0, enc_host_ctx = 0, motion_active, enc_active;
  logic        motion_host_sw = 0, enc_host_sw = 0, motion_host_we = 0;
  logic [7:0]  motion_host_addr = 0;
  logic [15:0] motion_host_wdata = 0;
  logic        motion_in_valid = 0, motion_in_ready, motion_out_valid, motion_out_ready = 1;
  logic [15:0] motion_in_data = 0, motion_out_data;
  logic [3:0]  motion_fsm_state;
  logic [15:0] motion_switch_count, motion_n_fsm_switch, motion_n_host_switch;
  logic        enc_in_valid = 0, enc_in_ready, enc_out_valid, enc_out_ready = 1;
  logic [7:0]  enc_in_data = 0, enc_out_data;
  logic [15:0] enc_pkt_count, enc_switch_count, enc_n_data_switch;
  logic        cell_cfg_en = 0, cell_cfg_bit = 0, cell_ctx_sw = 0, cell_ff_en = 0, cell_t_en = 1;
  ctx_t        cell_cfg_ctx = 0, cell_ctx = 0, cell_active;
  logic [3:0]  cell_in = 0;
  ctx_src_e    video_mode = SRC_HOST;
  ctx_t        video_host_ctx = 0, video_active;
  logic        video_host_sw = 0, video_in_valid = 0, video_in_ready, video_out_valid;
  logic        video_out_ready = 1;
  logic [15:0] video_in_data = 0, video_out_data, video_switch_count, video_n_host_switch;
  logic        cell_y, cell_y_oe;

  int checks = 0, failures = 0;
  logic [15:0] m_in_q[$], m_exp_q[$];
  logic [7:0]  e_in_q[$], e_exp_q[$];
  int unsigned n_ch [NUM_CTX] = '{default: 0};
  int n_wait_done = 0, n_drain = 0, n_stall = 0, n_pub = 0;
  bit motion_done = 0, enc_done = 0, video_done = 0;
  logic [15:0] v_exp_q[$];

  rcm_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); motion_host_we = 1; motion_host_addr = a; motion_host_wdata = d;
    @(negedge clk); motion_host_we = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // scoreboards and mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (motion_out_valid && motion_out_ready) begin
        check(m_exp_q.size() > 0 && motion_out_data == m_exp_q[0], "binary image word");
        if (m_exp_q.size() > 0) void'(m_exp_q.pop_front());
      end
      if (video_out_valid && video_out_ready) begin
        check(v_exp_q.size() > 0 && video_out_data == v_exp_q[0], "filtered video word");
        if (v_exp_q.size() > 0) void'(v_exp_q.pop_front());
      end
      if (enc_out_valid && enc_out_ready) begin
        check(e_exp_q.size() > 0 && enc_out_data == e_exp_q[0], "encrypted byte");
        if (e_exp_q.size() > 0) void'(e_exp_q.pop_front());
      end
      if ((motion_fsm_state == DIFF || motion_fsm_state == LPF || motion_fsm_state == BIN)
          && !dut.u_motion.done) n_wait_done++;
      if (dut.u_enc.u_ctrl.st == dut.u_enc.u_ctrl.S_WAIT_IDLE && !dut.u_enc.b_idle) n_drain++;
      if (dut.u_enc.c_valid && !dut.u_enc.c_ready) n_stall++;
    end
  end

  logic m_rdy_q, e_rdy_q;
  always @(posedge clk) begin m_rdy_q <= motion_in_ready; e_rdy_q <= enc_in_ready; end
  always @(negedge clk) begin
    if (rst_n) begin
      if (motion_in_valid && m_rdy_q) begin void'(m_in_q.pop_front()); motion_in_valid = 0; end
      if (!motion_in_valid && m_in_q.size() > 0) begin
        motion_in_valid = 1; motion_in_data = m_in_q[0];
      end
      if (enc_in_valid && e_rdy_q) begin void'(e_in_q.pop_front()); enc_in_valid = 0; end
      if (!enc_in_valid && e_in_q.size() > 0) begin enc_in_valid = 1; enc_in_data = e_in_q[0]; end
      // the host does not drain the encrypted stream until the output
      // FIFO has filled up and pushed back, then drains it at random
      enc_out_ready = (n_stall == 0) ? 1'b0 : ($urandom_range(0, 1) == 1);
    end
  end

  // motion detection
  initial begin
    frame_t prev, cur, b;
    prev = new[W * H]; cur = new[W * H];
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (prev[i]) prev[i] = 8'($urandom_range(0, 80));
    for (int w = 0; w < WORDS; w++) dut.u_motion.u_csrc_a.u_ram.mem[w] = {prev[2*w + 1], prev[2*w]};
    for (int fr = 0; fr < NFR; fr++) begin
      // a moving bright square on a noisy background
      foreach (cur[i]) begin
        int r, c;
        r = i / W; c = i % W;
        cur[i] = 8'($urandom_range(0, 6));
        if (r >= 30 && r < 60 && c >= 20 + 40 * fr && c < 60 + 40 * fr) cur[i] = 8'd200;
      end
      b = bin(lpf(diff(cur, prev), W, H), 8'd16);
      begin
        int ones;
        ones = 0;
        foreach (b[i]) ones += b[i];
        if (fr == 1) check(ones > 100 && ones < W * H / 4, $sformatf("motion found, background rejected (%0d)", ones));
      end
      for (int w = 0; w < WORDS; w++) begin
        m_in_q.push_back({cur[2*w + 1], cur[2*w]});
        m_exp_q.push_back({b[2*w + 1], b[2*w]});
      end
      prev = cur;
    end
    for (int a = 0; a < 64; a++) wr(8'(a), table_word(a));
    wr(8'h40, 16'd0);
    for (int p = 0; p < 4; p++) wr(8'h50 + 8'(p), 16'h10 | 16'(p));
    wr(8'h60, 16'h0001);
    wait (m_exp_q.size() == 0);
    // stop the FSM and switch CSRC A from the host
    wr(8'h60, 16'h0002);
    @(negedge clk);
    motion_mode = SRC_HOST; motion_host_ctx = CTX_LPF; motion_host_sw = 1;
    @(negedge clk); motion_host_sw = 0;
    check(motion_active == CTX_LPF, "host-driven switch");
    check(motion_n_fsm_switch >= 3 * NFR && motion_n_host_switch == 1, "switch sources counted");
    motion_done = 1;
  end

  // packet encryption
  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int len; ctx_t ch;
      len = $urandom_range(150, 600);
      ch  = ctx_t'($urandom);
      e_in_q.push_back(8'h00); e_in_q.push_back(8'h00); e_in_q.push_back({6'd0, ch});
      e_in_q.push_back(8'(len)); e_in_q.push_back(8'(len >> 8));
      for (int i = 0; i < len; i++) begin
        logic [7:0] x; x = 8'($urandom);
        e_in_q.push_back(x);
        e_exp_q.push_back(enc(x, n_ch[ch], CH_KEY0[ch], CH_KEY1[ch], CH_KEY2[ch],
                              CH_SBOXH[ch], CH_SBOXL[ch]));
        n_ch[ch]++;
      end
    end
    wait (rst_n);
    wait (e_in_q.size() == 0 && e_exp_q.size() == 0);
    repeat (20) @(negedge clk);
    check(enc_pkt_count == 16'(NPKT) && enc_n_data_switch == 16'(NPKT), "data-driven switches");
    enc_done = 1;
  end

  // fabric cell: ctx 0 = in[0] ^ in[1] with flip-flop, shares on leaving;
  // ctx 1 = registered output that starts from the public value
  task automatic cell_load(input ctx_t c, input logic [19:0] w);
    for (int b = 19; b >= 0; b--) begin
      @(negedge clk); cell_cfg_en = 1; cell_cfg_ctx = c; cell_cfg_bit = w[b];
    end
    @(negedge clk); cell_cfg_en = 0;
  endtask

  initial begin
    logic [15:0] xor_tab;
    for (int i = 0; i < 16; i++) xor_tab[i] = i[0] ^ i[1];
    wait (rst_n);
    cell_load(2'd0, {xor_tab, 4'b0101});   // comb out, share, driver on
    cell_load(2'd1, {16'h8000, 4'b1011});  // registered out, use public, driver on
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cell_in = 4'(i); #1;
      check(cell_y == xor_tab[i] && cell_y_oe, "cell table output");
    end
    cell_in = 4'b0001; cell_ff_en = 1;     // capture 1 into context 0's flip-flop
    @(negedge clk); cell_ff_en = 0;
    cell_ctx = 2'd1; cell_ctx_sw = 1;
    @(negedge clk); cell_ctx_sw = 0; #1;
    check(cell_active == 1 && cell_y == 1'b1, "value passed through the public register");
    if (cell_y) n_pub++;
  end

  // video filters: the host selects pass-through, fading delay and
  // difference for three consecutive frames
  initial begin
    logic [7:0] S [W * H];
    logic [7:0] cur [W * H];
    wait (rst_n);
    foreach (S[i]) S[i] = 8'($urandom);
    for (int w = 0; w < WORDS; w++) dut.u_video.u_csrc_a.u_ram.mem[w] = {S[2*w + 1], S[2*w]};
    for (int fr = 0; fr < 3; fr++) begin
      foreach (cur[i]) cur[i] = 8'($urandom);
      for (int w = 0; w < WORDS; w++) begin
        logic [15:0] e;
        for (int p = 0; p < 2; p++) begin
          int i;
          i = 2 * w + p;
          case (fr)
            1: begin e[8*p +: 8] = S[i]; S[i] = 8'((int'(S[i]) + int'(cur[i])) / 2); end
            2: begin
              e[8*p +: 8] = (cur[i] > S[i]) ? cur[i] - S[i] : S[i] - cur[i];
              S[i] = cur[i];
            end
            default: begin e[8*p +: 8] = S[i]; S[i] = cur[i]; end
          endcase
        end
        v_exp_q.push_back(e);
      end
      wait (v_exp_q.size() == WORDS);
      @(negedge clk); video_host_ctx = ctx_t'(fr); video_host_sw = 1;
      @(negedge clk); video_host_sw = 0;
      check(video_active == ctx_t'(fr), "host request selected the filter");
      for (int w = 0; w < WORDS; w++) begin
        video_in_valid = 1; video_in_data = {cur[2*w + 1], cur[2*w]};
        #1;
        while (!video_in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      video_in_valid = 0;
      wait (v_exp_q.size() == 0);
    end
    check(video_n_host_switch == 16'd3, "three host-driven filter switches");
    video_done = 1;
  end

  initial begin
    wait (motion_done && enc_done && video_done);
    repeat (5) @(negedge clk);
    check(n_wait_done > 0, "FSM waited for Done");
    check(n_drain > 0, "controller waited for the encryptor to drain");
    check(n_stall > 0, "output back-pressure reached the encryptor");
    check(n_pub > 0, "public register sharing");
    $display("video host_sw=%0d", video_n_host_switch);
    $display("fsm_sw=%0d host_sw=%0d data_sw=%0d done_waits=%0d drain_waits=%0d stalls=%0d",
             motion_n_fsm_switch, motion_n_host_switch, enc_n_data_switch, n_wait_done,
             n_drain, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
