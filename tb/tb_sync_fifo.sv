// tb_sync_fifo: random push/pop traffic against a queue model on a small
// FIFO; checks order, full/empty flags, the fill count, and that a word is
// readable one clock after it is written.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [15:0] q[$];

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

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
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready && count == 0, "empty after reset");
    // one-word latency
    in_valid = 1; in_data = 16'hBEEF;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 16'hBEEF && count == 1, "word readable next clock");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(!out_valid, "empty again");
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-biased, drain-biased
      bit fill = (cyc / 200) % 2 == 0;
      in_valid  = fill ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      out_ready = fill ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 9) < 8);
      in_data   = 16'($urandom);
      #1;
      check(in_ready == (q.size() < DEPTH), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      check(count == q.size(), "count");
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        check(out_data == q[0], "data order");
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
