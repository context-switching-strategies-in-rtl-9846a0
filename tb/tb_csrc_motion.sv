// tb_csrc_motion: drives the device pins the way the control FSM does
// (switch to a context, raise Calc, wait for Done, drop Calc) for three
// frames and compares the streamed binary image with the reference model.
// Also checks that a switch takes one clock, that only the active context
// reacts to Calc (unused context 11 does nothing) and the switch counter.
module tb_csrc_motion;
  import csrc_pkg::*;
  import motion_ref_pkg::*;
  localparam int W = 16, H = 8, WORDS = W * H / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_t ctx = 0, active;
  logic ctx_sw = 0, calc = 0, done, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_data = 0, out_data, switch_count;
  int checks = 0, failures = 0;
  frame_t cur, exp_b;
  int n_in, n_out;

  csrc_motion #(.W(W), .H(H), .THRESH(8'd16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input stream and output checker run all the time
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n && out_valid && out_ready) begin
      check(n_out < WORDS && out_data == {exp_b[2*n_out + 1], exp_b[2*n_out]},
            $sformatf("binary word %0d", n_out));
      n_out <= n_out + 1;
    end
  end
  always @(negedge clk) begin
    in_valid = (n_in < WORDS) && ($urandom_range(0, 3) != 0);
    if (n_in < WORDS) in_data = {cur[2*n_in + 1], cur[2*n_in]};
    out_ready = ($urandom_range(0, 3) != 0);
  end

  task automatic switch_to(input ctx_t c);
    @(negedge clk); ctx = c; ctx_sw = 1;
    @(negedge clk); ctx_sw = 0;
    check(active == c, "one-clock switch");
  endtask

  task automatic run_stage();
    @(negedge clk); calc = 1;
    while (!done) @(negedge clk);
    calc = 0;
    @(negedge clk);
  endtask

  initial begin
    frame_t prev, f;
    prev = new[W * H]; cur = new[W * H];
    foreach (cur[i]) cur[i] = 0;
    exp_b = new[W * H];
    n_in = WORDS; n_out = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prev[i]) prev[i] = 8'($urandom_range(0, 60));
    for (int w = 0; w < WORDS; w++) dut.u_ram.mem[w] = {prev[2*w + 1], prev[2*w]};
    // the unused context ignores Calc
    switch_to(2'b11);
    calc = 1; repeat (20) @(negedge clk);
    check(!done && !out_valid && !in_ready, "unused context idle");
    calc = 0; @(negedge clk);
    for (int fr = 0; fr < 3; fr++) begin
      foreach (cur[i]) cur[i] = (fr == 2) ? prev[i] : 8'($urandom_range(0, 60));
      f = lpf(diff(cur, prev), W, H);
      exp_b = bin(f, 8'd16);
      n_in = 0; n_out = 0;
      switch_to(CTX_DIFF); run_stage();
      check(n_in == WORDS, "frame consumed by the difference context");
      switch_to(CTX_LPF);  run_stage();
      check(n_out == 0, "nothing out before the binary context");
      switch_to(CTX_BIN);  run_stage();
      check(n_out == WORDS, "binary image complete");
      prev = cur;
    end
    check(switch_count == 16'd10, "switch count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
