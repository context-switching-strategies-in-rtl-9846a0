// tb_md_lpf: runs the 4x4 averaging context on small difference images
// preloaded into memory (random, all-255, and a single bright pixel) and
// compares the filtered region with the reference model, including the
// clamped right and bottom edges; checks 14 clocks per word, that it
// freezes while inactive, and the calc/done handshake.
module tb_md_lpf;
  import motion_ref_pkg::*;
  localparam int W = 10, H = 6, WORDS = W * H / 2, AW = 7;
  localparam int DB = WORDS, FB = 2 * WORDS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, calc = 0, done;
  logic mem_re, mem_we;
  logic [AW-1:0] mem_raddr, mem_waddr;
  logic [15:0] mem_rdata, mem_wdata;
  int checks = 0, failures = 0;

  md_lpf #(.W(W), .H(H), .AW(AW), .DIFF_BASE(DB), .FILT_BASE(FB)) dut (.*);
  csram #(.WIDTH(16), .DEPTH(128)) u_ram (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                          .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_t d, f;
    d = new[W * H];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int cycles;
      foreach (d[i]) begin
        case (t)
          0, 3: d[i] = 8'($urandom);
          1: d[i] = 8'hFF;
          default: d[i] = (i == W * 2 + 3) ? 8'hF0 : 8'h00;
        endcase
      end
      for (int w = 0; w < WORDS; w++) u_ram.mem[DB + w] = {d[2*w + 1], d[2*w]};
      @(negedge clk);
      calc = 1; cycles = 0;
      while (!done) begin
        if (t == 3) en = ($urandom_range(0, 3) != 0);
        @(negedge clk); cycles++;
      end
      en = 1;
      if (t < 3) check(cycles == 14 * WORDS + 1, $sformatf("14 clocks per word (%0d)", cycles));
      f = lpf(d, W, H);
      for (int w = 0; w < WORDS; w++)
        check(u_ram.mem[FB + w] == {f[2*w + 1], f[2*w]}, $sformatf("filtered word %0d test %0d", w, t));
      repeat (2) @(negedge clk);
      check(done, "done held");
      calc = 0;
      @(negedge clk);
      check(!done, "done cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
