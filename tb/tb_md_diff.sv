// tb_md_diff: runs the difference context on small frames with a preloaded
// previous frame, input gaps and periods where the context is inactive;
// checks the difference region and that the current frame replaced the
// previous one, the calc/done handshake, and three clocks per word when
// the stream never waits.
module tb_md_diff;
  import motion_ref_pkg::*;
  localparam int W = 8, H = 4, WORDS = W * H / 2, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, calc = 0, done, in_valid = 0, in_ready;
  logic [15:0] in_data = 0;
  logic mem_re, mem_we;
  logic [AW-1:0] mem_raddr, mem_waddr;
  logic [15:0] mem_rdata, mem_wdata;
  int checks = 0, failures = 0;

  md_diff #(.W(W), .H(H), .AW(AW), .PREV_BASE(0), .DIFF_BASE(WORDS)) dut (.*);
  csram #(.WIDTH(16), .DEPTH(64)) u_ram (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                         .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_frame(input frame_t cur, input bit gaps, output int cycles);
    int w;
    w = 0; cycles = 0;
    calc = 1;
    while (!done) begin
      if (gaps) en = ($urandom_range(0, 4) != 0);
      in_valid = (w < WORDS) && (!gaps || $urandom_range(0, 2) != 0);
      if (w < WORDS) in_data = {cur[2*w + 1], cur[2*w]};
      #1;
      if (in_valid && in_ready) w++;
      @(negedge clk);
      cycles++;
    end
    in_valid = 0; en = 1;
    check(w == WORDS, "whole frame taken");
    repeat (3) @(negedge clk);
    check(done, "done held while calc is high");
    calc = 0;
    @(negedge clk);
    check(!done, "done cleared after calc falls");
  endtask

  initial begin
    frame_t prev, cur, d;
    int cycles;
    prev = new[W * H]; cur = new[W * H];
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prev[i]) prev[i] = 8'($urandom);
    for (int w = 0; w < WORDS; w++) u_ram.mem[w] = {prev[2*w + 1], prev[2*w]};
    for (int f = 0; f < 3; f++) begin
      foreach (cur[i]) cur[i] = 8'($urandom);
      @(negedge clk);
      run_frame(cur, f != 1, cycles);
      d = diff(cur, prev);
      for (int w = 0; w < WORDS; w++) begin
        check(u_ram.mem[WORDS + w] == {d[2*w + 1], d[2*w]}, $sformatf("difference word %0d", w));
        check(u_ram.mem[w] == {cur[2*w + 1], cur[2*w]}, "current frame stored");
      end
      if (f == 1) check(cycles == 3 * WORDS + 1, $sformatf("3 clocks per word (%0d)", cycles));
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
