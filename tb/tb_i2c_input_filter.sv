// tb_i2c_input_filter: spike suppression and latency of the input filter.
//
// Two filters are tested, with the default SPIKE_CYCLES = 1 and with 3. A
// pulse of up to SPIKE_CYCLES cycles must not reach the output; one cycle
// longer must. A clean edge must appear SPIKE_CYCLES + 3 cycles after the
// input changes.
`timescale 1ns/1ps
module tb_i2c_input_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d = 1, q1, q3;
  i2c_input_filter                    dut1 (.clk, .rst_n, .d, .q(q1));
  i2c_input_filter #(.SPIKE_CYCLES(3)) dut3 (.clk, .rst_n, .d, .q(q3));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int changes1 = 0, changes3 = 0;
  logic q1_q = 1, q3_q = 1;
  always @(posedge clk) begin
    if (rst_n && q1 != q1_q) changes1++;
    if (rst_n && q3 != q3_q) changes3++;
    q1_q <= q1; q3_q <= q3;
  end

  // A pulse of `len` cycles to level `lvl`, then settle.
  task automatic pulse(bit lvl, int len);
    @(negedge clk); d = lvl;
    repeat (len) @(negedge clk);
    d = !lvl;
    repeat (12) @(negedge clk);
  endtask

  // Cycles from an input edge until q1/q3 follow it.
  task automatic edge_latency(bit lvl, output int l1, output int l3);
    int n = 0;
    l1 = -1; l3 = -1;
    @(negedge clk); d = lvl;
    while ((l1 < 0 || l3 < 0) && n < 20) begin
      @(posedge clk); n++;
      #1;
      if (l1 < 0 && q1 == lvl) l1 = n;
      if (l3 < 0 && q3 == lvl) l3 = n;
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l1, l3, c1, c3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(q1 && q3, "outputs idle high after reset");

    c1 = changes1; c3 = changes3;
    pulse(0, 1);
    check(changes1 == c1 && changes3 == c3, "1-cycle low spike suppressed by both");
    pulse(0, 2);
    check(changes1 == c1 + 2, "2-cycle low pulse passes SPIKE_CYCLES=1");
    check(changes3 == c3, "2-cycle low pulse suppressed by SPIKE_CYCLES=3");
    c1 = changes1;
    pulse(0, 3);
    check(changes3 == c3, "3-cycle low pulse suppressed by SPIKE_CYCLES=3");
    pulse(0, 4);
    check(changes3 == c3 + 2, "4-cycle low pulse passes SPIKE_CYCLES=3");

    edge_latency(0, l1, l3);
    check(l1 == 4, $sformatf("falling edge latency %0d, expected 4", l1));
    check(l3 == 6, $sformatf("falling edge latency %0d, expected 6", l3));
    repeat (10) @(negedge clk);
    c1 = changes1; c3 = changes3;
    pulse(1, 1);
    check(changes1 == c1 && changes3 == c3, "1-cycle high spike suppressed");
    edge_latency(1, l1, l3);
    check(l1 == 4 && l3 == 6, $sformatf("rising edge latency %0d / %0d", l1, l3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
