// tb_i2c_xfer_fifo: transmit FIFO of transfer descriptors.
//
// Two FIFOs, the default depth 4 and a depth of 3 (pointers that wrap at a
// non-power of two), receive random pushes and pops. A queue model predicts
// the output, the occupancy and the full/empty flags every cycle. Descriptors
// are random bit patterns, so every field must come through intact.
`timescale 1ns/1ps
module tb_i2c_xfer_fifo;
  import i2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic  in_valid = 0, pop4 = 0, pop3 = 0;
  xfer_t in = '0;
  logic  rdy4, rdy3, ov4, ov3;
  xfer_t out4, out3;
  logic [2:0] cnt4;
  logic [1:0] cnt3;

  i2c_xfer_fifo                dut4 (.clk, .rst_n, .in_valid, .in_ready(rdy4), .in,
                                     .out_valid(ov4), .out(out4), .pop(pop4), .count(cnt4));
  i2c_xfer_fifo #(.DEPTH(3))   dut3 (.clk, .rst_n, .in_valid, .in_ready(rdy3), .in,
                                     .out_valid(ov3), .out(out3), .pop(pop3), .count(cnt3));

  xfer_t q4[$], q3[$];
  int n_full4 = 0, n_full3 = 0, n_empty = 0;

  function automatic xfer_t rnd_xfer();
    logic [$bits(xfer_t)-1:0] b;
    for (int i = 0; i < $bits(xfer_t); i += 32) b = {b, $urandom()};
    return xfer_t'(b);
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ov4 && !ov3 && rdy4 && rdy3 && cnt4 == 0 && cnt3 == 0, "empty after reset");
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases of mostly-push and mostly-pop traffic to reach full and empty
      int bias;
      bit push4, push3;
      bias = ((cyc / 200) % 2 == 0) ? 75 : 25;
      in_valid = ($urandom_range(99) < bias);
      in       = rnd_xfer();
      pop4     = ov4 && ($urandom_range(99) >= bias);
      pop3     = ov3 && ($urandom_range(99) >= bias);
      // model: what the FIFOs show now
      check(ov4 == (q4.size() != 0) && rdy4 == (q4.size() != 4) && cnt4 == 3'(q4.size()),
            $sformatf("depth 4 flags: count %0d, model %0d", cnt4, q4.size()));
      check(ov3 == (q3.size() != 0) && rdy3 == (q3.size() != 3) && cnt3 == 2'(q3.size()),
            $sformatf("depth 3 flags: count %0d, model %0d", cnt3, q3.size()));
      if (q4.size() != 0) check(out4 == q4[0], "depth 4 head descriptor");
      if (q3.size() != 0) check(out3 == q3[0], "depth 3 head descriptor");
      if (q4.size() == 4) n_full4++;
      if (q3.size() == 3) n_full3++;
      if (q4.size() == 0 && q3.size() == 0) n_empty++;
      push4 = in_valid && rdy4;
      push3 = in_valid && rdy3;
      @(posedge clk);
      if (pop4) void'(q4.pop_front());
      if (pop3) void'(q3.pop_front());
      if (push4) q4.push_back(in);
      if (push3) q3.push_back(in);
      @(negedge clk);
    end
    in_valid = 0; pop4 = 0; pop3 = 0;
    check(n_full4 > 20 && n_full3 > 20, $sformatf("FIFOs full %0d / %0d cycles", n_full4, n_full3));
    check(n_empty > 20, $sformatf("FIFOs empty %0d cycles", n_empty));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
