// tb_i2c_byte_engine: the master bit/byte engine against a scripted slave.
//
// The testbench plays the slave on the wired-AND bus: it acknowledges or
// refuses written bytes, sends bytes for reads, and once holds SCL low for a
// long time to stretch the clock. A bus monitor decodes the traffic, which
// is compared with the commands given. At 400 kHz (63-cycle phases) a byte
// must take 9 x (4 x 63 + 4) = 2304 cycles from command to done, the 4
// being the input filter's delay before each SCL high phase is timed.
`timescale 1ns/1ps
module tb_i2c_byte_engine;
  import i2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  speed_e speed = SPEED_FAST;
  logic cmd_valid = 0, send_ack = 1, cmd_ready, done, ack_rcvd, bus_held;
  cmd_e cmd = CMD_START;
  logic [7:0] wdata = 0, rdata;
  logic scl_oe, sda_oe, scl, sda;
  logic tb_scl_low = 0, tb_sda_low = 0;

  assign scl = !(scl_oe || tb_scl_low);
  assign sda = !(sda_oe || tb_sda_low);

  i2c_byte_engine dut (.clk, .rst_n, .speed, .cmd_valid, .cmd, .wdata, .send_ack,
                       .cmd_ready, .done, .rdata, .ack_rcvd, .bus_held,
                       .scl_in(scl), .sda_in(sda), .scl_oe, .sda_oe);

  logic ev_valid, ev_ack; logic [1:0] ev_kind; logic [7:0] ev_byte; int partial;
  i2c_bus_monitor mon (.clk, .scl, .sda, .ev_valid, .ev_kind, .ev_byte, .ev_ack,
                       .partial_frames(partial));

  typedef logic [10:0] ev_t;
  ev_t got[$];
  always @(posedge clk) if (ev_valid) got.push_back({ev_kind, ev_byte, ev_ack});

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ncycle = 0;
  always @(posedge clk) ncycle++;

  // Issue one command and return the cycles it took.
  task automatic issue(cmd_e c, logic [7:0] d, bit a, output int cycles);
    int t0;
    @(negedge clk); cmd = c; wdata = d; send_ack = a; cmd_valid = 1;
    t0 = ncycle;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
    cycles = ncycle - t0;
  endtask

  // Slave side: acknowledge (or not) the byte now being written.
  task automatic slave_ack(bit ack);
    repeat (8) @(posedge scl);
    @(negedge scl); #1 tb_sda_low = ack;
    @(negedge scl); #1 tb_sda_low = 0;
  endtask

  // Slave side: send a byte; SCL is low when this starts.
  task automatic slave_send(logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      tb_sda_low = !b[i];
      @(negedge scl); #1;
    end
    tb_sda_low = 0;
  endtask

  // Slave side: hold SCL low, which is low already, for a while.
  task automatic slave_stretch(int cycles);
    tb_scl_low = 1;
    repeat (cycles) @(posedge clk);
    tb_scl_low = 0;
  endtask

  int cyc, high_min = 1 << 30, high_run = 0;
  always @(posedge clk) begin
    if (scl) high_run++;
    else begin
      if (high_run > 0 && high_run < high_min) high_min = high_run;
      high_run = 0;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int partial0 = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(cmd_ready && scl && sda && !bus_held, "idle bus after reset");
    // the pads are undefined until reset has taken effect: forget what the
    // monitor saw before
    got.delete();
    partial0 = partial;

    issue(CMD_START, 0, 1, cyc);
    check(bus_held && !scl && !sda, "START leaves SCL and SDA low");

    fork slave_ack(1); issue(CMD_WRITE, 8'hA5, 1, cyc); join
    check(ack_rcvd, "byte A5 acknowledged");
    // plus one cycle for the command handshake
    check(cyc == 2304 + 1, $sformatf("byte took %0d cycles, expected 2305", cyc));

    fork slave_ack(0); issue(CMD_WRITE, 8'h3C, 1, cyc); join
    check(!ack_rcvd, "byte 3C not acknowledged");

    fork slave_send(8'h96); issue(CMD_READ, 0, 1, cyc); join
    check(rdata == 8'h96, $sformatf("read %h, expected 96", rdata));

    // stretch the clock after this byte for 1000 cycles
    fork slave_ack(1); issue(CMD_WRITE, 8'h0F, 1, cyc); join
    fork slave_stretch(1000); slave_send(8'h5A); issue(CMD_READ, 0, 0, cyc); join
    check(rdata == 8'h5A, $sformatf("read %h, expected 5A", rdata));
    // the two low phases run while SCL is held, so 1000 cycles of stretch
    // cost 1000 - 2 x 63; the hold starts up to 5 cycles before the command
    check(cyc <= 2305 + 1000 - 2 * 63 && cyc >= 2305 + 1000 - 2 * 63 - 5,
          $sformatf("stretched read took %0d cycles", cyc));

    issue(CMD_START, 0, 1, cyc);          // repeated START
    fork slave_ack(1); issue(CMD_WRITE, 8'h81, 1, cyc); join
    issue(CMD_STOP, 0, 1, cyc);
    check(!bus_held && scl && sda, "STOP releases the bus");
    repeat (5) @(posedge clk);

    begin
      ev_t exp[$];
      exp = '{ {2'd0, 8'h00, 1'b0}, {2'd2, 8'hA5, 1'b1}, {2'd2, 8'h3C, 1'b0},
               {2'd2, 8'h96, 1'b1}, {2'd2, 8'h0F, 1'b1}, {2'd2, 8'h5A, 1'b0},
               {2'd0, 8'h00, 1'b0}, {2'd2, 8'h81, 1'b1}, {2'd1, 8'h00, 1'b0} };
      check(got.size() == exp.size(), $sformatf("%0d bus events, expected %0d", got.size(), exp.size()));
      foreach (exp[i])
        if (i < got.size()) check(got[i] == exp[i], $sformatf("event %0d: %h expected %h", i, got[i], exp[i]));
    end
    check(partial == partial0, "no frame cut short");
    check(high_min >= 2 * 63, $sformatf("shortest SCL high %0d cycles", high_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
