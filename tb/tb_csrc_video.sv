// tb_csrc_video: streams several small frames through the three-filter
// device while the host switches the filter at random words, with random
// input gaps and output stalls; a clock-by-clock model of the frame store
// and of the filter active at each word checks every output word. Checks
// two clocks per word without stalls and that every filter was used.
module tb_csrc_video;
  import csrc_pkg::*;
  localparam int W = 8, H = 2, WORDS = W * H / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_t ctx = 0, active;
  logic ctx_sw = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_data = 0, out_data, switch_count;
  int checks = 0, failures = 0;
  logic [7:0] S [W * H];
  ctx_t m_act = 0;
  int widx = 0, n_words = 0, used [3] = '{0, 0, 0};

  csrc_video #(.W(W), .H(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [15:0] e;
      for (int p = 0; p < 2; p++) begin
        logic [7:0] x, s;
        x = in_data[8*p +: 8]; s = S[2*widx + p];
        case (m_act)
          2'b01: begin e[8*p +: 8] = s; S[2*widx + p] = 8'((int'(s) + int'(x)) / 2); end
          2'b10: begin e[8*p +: 8] = (x > s) ? x - s : s - x; S[2*widx + p] = x; end
          default: begin e[8*p +: 8] = s; S[2*widx + p] = x; end
        endcase
      end
      if (m_act < 3) used[m_act]++;
      check(out_data == e, $sformatf("word %0d filter %0d", n_words, m_act));
      widx = (widx + 1) % WORDS; n_words++;
    end
    if (rst_n && ctx_sw) m_act = ctx;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (S[i]) S[i] = 8'($urandom);
    for (int w = 0; w < WORDS; w++) dut.u_ram.mem[w] = {S[2*w + 1], S[2*w]};
    // two clocks per word with no stalls
    @(negedge clk);
    t0 = n_words;
    in_valid = 1; in_data = 16'($urandom);
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      if (n_words != t0 && (n_words - t0) % 1 == 0) in_data = 16'($urandom);
      t0 = n_words;
    end
    in_valid = 0;
    check(n_words == 20, $sformatf("two clocks per word (%0d words in 40 clocks)", n_words));
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ctx_sw = ($urandom_range(0, 6) == 0); ctx = ctx_t'($urandom_range(0, 2));
      out_ready = ($urandom_range(0, 3) != 0);
      if (!in_valid && $urandom_range(0, 2) != 0) begin in_valid = 1; in_data = 16'($urandom); end
      #1;
      if (in_valid && in_ready) begin
        @(posedge clk); #1;
        in_valid = 0;
      end
    end
    check(used[0] > 0 && used[1] > 0 && used[2] > 0, "every filter used");
    check(switch_count > 0, "switch count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
