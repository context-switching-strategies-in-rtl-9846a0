// tb_cslc: loads random configurations into the four planes of one cell
// through the serial port, then runs random inputs, flip-flop enables,
// context switches and reloads of inactive planes against a cycle model of
// the cell (table output, private/public registers, output select and
// driver enable). Counts switches that shared a value through the public
// register; these must occur.
module tb_cslc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_en = 0, cfg_bit = 0, ctx_sw = 0, ff_en = 0, t_en = 0, y, y_oe;
  logic [1:0] cfg_ctx = 0, ctx = 0, active;
  logic [3:0] in = 0;
  int checks = 0, failures = 0, n_pub = 0;
  logic [19:0] m_cfg [4];
  logic [3:0]  m_priv;
  logic        m_pub;
  logic [1:0]  m_act;

  cslc #(.NUM_CTX(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(input logic [1:0] c, input logic [19:0] w);
    for (int b = 19; b >= 0; b--) begin
      cfg_en = 1; cfg_ctx = c; cfg_bit = w[b];
      @(negedge clk);
    end
    cfg_en = 0;
    m_cfg[c] = w;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 4; c++) load(2'(c), 20'($urandom));
    m_priv = 0; m_pub = 0; m_act = 0;
    for (int i = 0; i < 3000; i++) begin
      logic exp_y, lut_o, pubn;
      in = 4'($urandom); ff_en = 1'($urandom); t_en = 1'($urandom);
      ctx_sw = ($urandom_range(0, 5) == 0); ctx = 2'($urandom);
      #1;
      lut_o = m_cfg[m_act][4 + in];
      exp_y = m_cfg[m_act][3] ? m_priv[m_act] : lut_o;
      check(active == m_act, "active context");
      check(y == exp_y, "cell output");
      check(y_oe == (m_cfg[m_act][0] && t_en), "driver enable");
      // model the clock edge
      if (ctx_sw) begin
        pubn = m_cfg[m_act][2] ? m_priv[m_act] : m_pub;
        if (m_cfg[m_act][2] && m_cfg[ctx][1]) n_pub++;
        if (m_cfg[ctx][1]) m_priv[ctx] = pubn;
        m_pub = pubn;
        m_act = ctx;
      end else if (ff_en) m_priv[m_act] = lut_o;
      @(negedge clk);
      ctx_sw = 0;
      // now and then reload an inactive plane while the cell runs
      if (i % 250 == 100) begin
        logic [1:0] c;
        c = m_act + 2'd1;
        ff_en = 0;
        for (int b = 19; b >= 0; b--) begin
          logic [19:0] w;
          if (b == 19) w = 20'($urandom);
          cfg_en = 1; cfg_ctx = c; cfg_bit = w[b];
          #1 check(y == (m_cfg[m_act][3] ? m_priv[m_act] : m_cfg[m_act][4 + in]), "runs during load");
          @(negedge clk);
          if (b == 0) m_cfg[c] = w;
        end
        cfg_en = 0;
      end
    end
    check(n_pub > 0, "value shared through the public register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
