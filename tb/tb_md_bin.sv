// tb_md_bin: preloads a filtered image with values around the threshold
// (including equal to it), runs the binary context with random output
// back-pressure and inactive periods, and compares every output word with
// the reference; checks two clocks per word without back-pressure and the
// calc/done handshake.
module tb_md_bin;
  import motion_ref_pkg::*;
  localparam int W = 8, H = 6, WORDS = W * H / 2, AW = 7, FB = 64;
  localparam logic [7:0] TH = 8'd16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, calc = 0, done, out_valid, out_ready = 1;
  logic [15:0] out_data;
  logic mem_re;
  logic [AW-1:0] mem_raddr;
  logic [15:0] mem_rdata;
  int checks = 0, failures = 0;

  md_bin #(.W(W), .H(H), .AW(AW), .FILT_BASE(FB), .THRESH(TH)) dut (.*);
  csram #(.WIDTH(16), .DEPTH(128)) u_ram (.clk, .we(1'b0), .waddr('0), .wdata('0),
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

  initial begin
    frame_t f, b;
    f = new[W * H];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int n, cycles;
      foreach (f[i]) f[i] = (i % 5 == 0) ? TH : 8'(int'(TH) - 3 + $urandom_range(0, 6));
      if (t == 2) foreach (f[i]) f[i] = 8'($urandom);
      for (int w = 0; w < WORDS; w++) u_ram.mem[FB + w] = {f[2*w + 1], f[2*w]};
      b = bin(f, TH);
      @(negedge clk);
      calc = 1; n = 0; cycles = 0;
      while (!done) begin
        if (t > 0) begin
          out_ready = ($urandom_range(0, 2) != 0);
          en = ($urandom_range(0, 4) != 0);
        end
        #1;
        if (out_valid && out_ready) begin
          check(n < WORDS && out_data == {b[2*n + 1], b[2*n]}, $sformatf("binary word %0d", n));
          n++;
        end
        @(negedge clk); cycles++;
      end
      en = 1; out_ready = 1;
      check(n == WORDS, "all words sent");
      if (t == 0) check(cycles == 2 * WORDS + 1, $sformatf("2 clocks per word (%0d)", cycles));
      calc = 0;
      @(negedge clk);
      check(!done, "done cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
