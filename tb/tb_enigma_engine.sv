// tb_enigma_engine: streams random bytes with random gaps and random
// output back-pressure through one encryptor and compares every output
// byte with the reference model; checks the 7-clock latency, one byte per
// clock throughput, the rotor odometer across a wrap of rotor 0 and 1
// (position preset by streaming), holding while disabled, and idle.
module tb_enigma_engine;
  import enigma_ref_pkg::*;
  localparam logic [7:0]  K0 = 8'h17, K1 = 8'h8E, K2 = 8'h42;
  localparam logic [63:0] SH = 64'h2E9C_4B07_D15A_63F8, SL = 64'h5D08_F3A6_1C7E_942B;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, in_valid = 0, in_ready, out_valid, out_ready = 1, idle;
  logic [7:0] in_data = 0, out_data;
  logic [23:0] position;
  int checks = 0, failures = 0;
  logic [7:0] exp_q[$];
  int unsigned n_in = 0;
  int cycle = 0;

  enigma_engine #(.KEY0(K0), .KEY1(K1), .KEY2(K2), .SBOX_HI(SH), .SBOX_LO(SL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("byte %0d", n_in));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic send(input logic [7:0] b);
    // called just after a falling edge; the byte is taken at the next
    // rising edge where in_ready was high before it
    in_valid = 1; in_data = b;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    exp_q.push_back(enc(b, n_in, K0, K1, K2, SH, SL));
    n_in++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(idle && !out_valid, "idle after reset");
    // latency: one byte
    in_valid = 1; in_data = 8'h41;
    @(posedge clk); t0 = cycle;
    exp_q.push_back(enc(8'h41, 0, K0, K1, K2, SH, SL)); n_in = 1;
    #1 in_valid = 0;
    check(!idle, "busy with a byte inside");
    wait (out_valid); t1 = cycle;
    check(t1 - t0 == 7, $sformatf("latency %0d clocks", t1 - t0));
    @(negedge clk);
    // throughput: 64 back-to-back bytes leave in 64 consecutive clocks
    fork
      for (int i = 0; i < 64; i++) send(8'($urandom));
      begin
        int first, last, cnt;
        cnt = 0; first = 0; last = 0;
        while (cnt < 64) begin
          @(negedge clk); #2;
          if (out_valid && out_ready) begin
            if (cnt == 0) first = cycle;
            last = cycle; cnt++;
          end
        end
        check(last - first == 63, "one byte per clock");
      end
    join
    // random traffic with back-pressure and disabled periods, past the
    // wrap of rotor 0 several times and of rotor 1 once (over 65536 bytes)
    fork
      begin
        for (int i = 0; i < 66000; i++) begin
          if ($urandom_range(0, 7) == 0) @(negedge clk);
          else #0;
          send(8'($urandom));
        end
      end
      begin
        for (int c = 0; c < 100000; c++) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 9) != 0);
          en = ($urandom_range(0, 19) != 0);
        end
        en = 1; out_ready = 1;
      end
    join_any
    en = 1; out_ready = 1;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all bytes came out");
    check(idle, "idle at the end");
    check(position == 24'(n_in), "position counts bytes");
    check(position[15:8] != 0, "rotor 1 has stepped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
