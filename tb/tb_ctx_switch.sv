// tb_ctx_switch: random context-switch commands; checks that the active
// context changes on the clock edge where the strobe is seen (one-clock
// switch), holds otherwise, and that the switch counter counts.
module tb_ctx_switch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] ctx = 0, active;
  logic ctx_sw = 0, switched;
  logic [15:0] switch_count;
  int checks = 0, failures = 0;
  logic [1:0] exp_active;
  int exp_count;

  ctx_switch #(.NUM_CTX(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(active == 0 && switch_count == 0, "reset to context 0");
    exp_active = 0; exp_count = 0;
    for (int i = 0; i < 1000; i++) begin
      ctx = 2'($urandom); ctx_sw = ($urandom_range(0, 3) == 0);
      #1 check(active == exp_active, "no change before the edge");
      if (ctx_sw) begin exp_active = ctx; exp_count++; end
      @(negedge clk);
      check(active == exp_active, "active after one clock");
      check(switched == ctx_sw, "switched pulse");
      check(switch_count == 16'(exp_count), "switch count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
