// tb_csrc_enigma: switches the device between its four encryptor contexts
// in random order, streams a random burst through each active one and
// compares every byte with the reference model of that channel. Each
// channel's key stream must continue across the times it was inactive.
// Also checks the one-clock switch and that idle is low while a burst is
// inside a pipeline.
module tb_csrc_enigma;
  import csrc_pkg::*;
  import enigma_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_t ctx = 0, active;
  logic ctx_sw = 0, idle, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] switch_count;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int unsigned n_ch [NUM_CTX] = '{default: 0};
  logic [7:0] exp_q[$];
  int seen_busy = 0;

  csrc_enigma dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], "encrypted byte");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (rst_n && !idle) seen_busy++;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int burst = 0; burst < 200; burst++) begin
      ctx_t c;
      int len;
      c = ctx_t'($urandom);
      // wait for the pipelines to drain, then switch
      while (!idle) @(negedge clk);
      ctx = c; ctx_sw = 1;
      @(negedge clk);
      ctx_sw = 0;
      check(active == c, "active one clock after the switch");
      len = $urandom_range(1, 40);
      for (int i = 0; i < len; i++) begin
        in_valid = 1; in_data = 8'($urandom);
        out_ready = ($urandom_range(0, 5) != 0);
        #1;
        while (!in_ready) begin @(negedge clk); out_ready = 1; #1; end
        exp_q.push_back(enc(in_data, n_ch[c], CH_KEY0[c], CH_KEY1[c], CH_KEY2[c],
                            CH_SBOXH[c], CH_SBOXL[c]));
        n_ch[c]++;
        @(negedge clk);
      end
      in_valid = 0; out_ready = 1;
    end
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "every byte came out");
    check(switch_count == 200, "switch count");
    check(seen_busy > 0, "idle dropped while busy");
    for (int c = 0; c < NUM_CTX; c++) check(n_ch[c] > 0, "every channel used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
