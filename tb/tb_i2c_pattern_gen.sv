// tb_i2c_pattern_gen: the three data patterns against tables.
//
// The first 21 Fibonacci numbers and the 4-bit Gray code table are written
// out below; the generator's values (taken modulo 256) must match them. Then
// long runs of every pattern from several start indices are compared with
// the reference function of the package, and the number of cycles spent
// skipping to the start index is checked.
`timescale 1ns/1ps
module tb_i2c_pattern_gen;
  import i2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, next = 0, ready;
  pattern_e pattern = PAT_INCR;
  logic [7:0] start = 0, data;

  i2c_pattern_gen dut (.clk, .rst_n, .load, .pattern, .start, .next, .ready, .data);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned fib_tab[21] = '{0, 1, 1, 2, 3, 5, 8, 13, 21, 34, 55, 89, 144, 233,
                               377, 610, 987, 1597, 2584, 4181, 6765};
  logic [3:0] gray_tab[16] = '{4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111,
                               4'b0101, 4'b0100, 4'b1100, 4'b1101, 4'b1111, 4'b1110,
                               4'b1010, 4'b1011, 4'b1001, 4'b1000};

  task automatic do_load(pattern_e p, logic [7:0] s);
    int waited = 0;
    @(negedge clk); pattern = p; start = s; load = 1;
    @(negedge clk); load = 0;
    while (!ready) begin @(negedge clk); waited++; end
    check(waited == s, $sformatf("skip to %0d took %0d cycles", s, waited));
  endtask

  task automatic step();
    next = 1; @(negedge clk); next = 0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_load(PAT_FIB, 0);
    for (int i = 0; i < 21; i++) begin
      check(data == 8'(fib_tab[i] % 256), $sformatf("fib %0d = %0d", i, data));
      step();
    end
    do_load(PAT_GRAY, 0);
    for (int i = 0; i < 16; i++) begin
      check(data[3:0] == gray_tab[i] && data[7:4] == 0, $sformatf("gray %0d = %b", i, data));
      step();
    end
    do_load(PAT_INCR, 0);
    for (int i = 0; i < 300; i++) begin
      check(data == 8'(i), $sformatf("incr %0d = %0d", i, data));
      step();
    end
    for (int p = 0; p < 3; p++) begin
      logic [7:0] s;
      s = 8'($urandom);
      do_load(pattern_e'(p), s);
      for (int i = 0; i < 40; i++) begin
        check(data == pattern_value(pattern_e'(p), s + i),
              $sformatf("pattern %0d start %0d element %0d = %0d", p, s, i, data));
        // hold `next` low for a cycle now and then: the value must not move
        if (i % 5 == 0) begin
          logic [7:0] d;
          d = data;
          @(negedge clk);
          check(data == d, "value held without next");
        end
        step();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
