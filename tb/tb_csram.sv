// tb_csram: writes random words to random addresses of a small memory and
// reads them back against a model, checking the one-clock read latency,
// that rdata holds when re is low and read-before-write on a collision.
module tb_csram;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  csram #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 6'(a); wdata = 16'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] exp;
      logic [15:0] prev;
      re = 1'($urandom_range(0, 1)); raddr = 6'($urandom);
      we = 1'($urandom_range(0, 1)); waddr = ($urandom_range(0, 3) == 0) ? raddr : 6'($urandom);
      wdata = 16'($urandom);
      exp = model[raddr];
      prev = rdata;
      @(negedge clk);
      if (re) check(rdata == exp, "read data (old word on collision)");
      else    check(rdata == prev, "rdata held");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
