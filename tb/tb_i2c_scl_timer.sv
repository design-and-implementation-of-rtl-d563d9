// tb_i2c_scl_timer: checks the phase length of each speed grade.
//
// With a 100 MHz clock the phase lengths must be 250 cycles (100 kHz),
// 63 cycles (400 kHz, rounded up) and, at 3.4 MHz, 10 cycles with SCL low and
// 5 with SCL high (high:low = 1:2). It also checks that dropping `run`
// restarts the count.
`timescale 1ns/1ps
module tb_i2c_scl_timer;
  import i2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  speed_e speed = SPEED_STD;
  logic run = 0, scl_high = 0, tick;

  i2c_scl_timer #(.CLK_HZ(100_000_000)) dut (.clk, .rst_n, .speed, .run, .scl_high, .tick);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Cycles from enabling the timer to each of three ticks.
  task automatic measure(speed_e sp, bit hi, int expect_len);
    int n, last;
    @(negedge clk); speed = sp; scl_high = hi; run = 0;
    @(negedge clk); run = 1;
    n = 0; last = 0;
    for (int t = 0; t < 3; t++) begin
      do begin @(posedge clk); n++; end while (!tick);
      check(n - last == expect_len,
            $sformatf("speed %0d high %0d: tick after %0d cycles, expected %0d",
                      sp, hi, n - last, expect_len));
      last = n;
    end
    @(negedge clk); run = 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(SPEED_STD,  0, 250);
    measure(SPEED_STD,  1, 250);
    measure(SPEED_FAST, 0, 63);
    measure(SPEED_FAST, 1, 63);
    measure(SPEED_HS,   0, 10);
    measure(SPEED_HS,   1, 5);
    // A pause in `run` restarts the phase.
    @(negedge clk); speed = SPEED_HS; scl_high = 0; run = 1;
    repeat (7) @(negedge clk);
    run = 0;
    repeat (3) @(negedge clk);
    check(!tick, "no tick while stopped");
    run = 1;
    begin
      int n = 0;
      do begin @(posedge clk); n++; end while (!tick);
      check(n == 10, $sformatf("restart after pause: %0d cycles", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
