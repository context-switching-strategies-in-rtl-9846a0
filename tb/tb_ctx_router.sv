// tb_ctx_router: drives host, FSM and data requests together in each mode;
// checks that only the selected source reaches the context lines, that host
// and FSM commands pass in the same clock, that a data request is issued
// and acknowledged one clock later, and the per-source counters.
module tb_ctx_router;
  import csrc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ctx_src_e mode = SRC_HOST;
  ctx_t host_ctx = 0, fsm_ctx = 0, data_ctx = 0, ctx;
  logic host_sw = 0, fsm_sw = 0, data_req = 0, ctx_sw, data_ack;
  logic [15:0] n_host, n_fsm, n_data;
  int checks = 0, failures = 0;
  int eh = 0, ef = 0, ed = 0;

  ctx_router dut (.*);

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
    logic prev_req; ctx_t prev_dctx; ctx_src_e prev_mode;
    repeat (2) @(posedge clk); rst_n = 1;
    prev_req = 0; prev_dctx = 0; prev_mode = SRC_HOST;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (i % 300 == 0) mode = ctx_src_e'((i / 300) % 3);
      host_ctx = ctx_t'($urandom); host_sw = ($urandom_range(0, 3) == 0);
      fsm_ctx  = ctx_t'($urandom); fsm_sw  = ($urandom_range(0, 3) == 0);
      data_ctx = ctx_t'($urandom); data_req = ($urandom_range(0, 3) == 0);
      #1;
      unique case (mode)
        SRC_HOST: check(ctx_sw == host_sw && (!host_sw || ctx == host_ctx), "host passes");
        SRC_FSM:  check(ctx_sw == fsm_sw && (!fsm_sw || ctx == fsm_ctx), "fsm passes");
        default: begin
          check(ctx_sw == (prev_req && prev_mode == SRC_DATA), "data switch one clock later");
          check(data_ack == ctx_sw, "ack with switch");
          if (ctx_sw) check(ctx == prev_dctx, "data context");
        end
      endcase
      if (ctx_sw) begin
        if (mode == SRC_HOST) eh++;
        if (mode == SRC_FSM) ef++;
        if (mode == SRC_DATA) ed++;
      end
      prev_req = data_req; prev_dctx = data_ctx; prev_mode = mode;
    end
    @(negedge clk);
    check(n_host == 16'(eh) && n_fsm == 16'(ef) && n_data == 16'(ed) && ed > 0, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
