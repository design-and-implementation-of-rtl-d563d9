// tb_i2c_master_ctrl: directed transfers through the I2C controller.
//
// The controller talks to a test-card slave; a bus monitor decodes the bus.
// For every transfer the testbench builds the expected sequence of START,
// STOP and 9-bit frames from the transfer descriptor alone (address formats,
// word address, pattern values, ACK/NACK of each byte) and compares it with
// what the monitor saw. Read data is compared with a shadow copy of what was
// written. It also measures the SCL period at each speed grade: four
// phases plus the four-cycle input-filter delay of the clock-release check.
`timescale 1ns/1ps
module tb_i2c_master_ctrl;
  import i2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, done, nack, rd_valid, wr_valid;
  xfer_t req;
  logic [7:0] rd_data, wr_data;
  logic m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, scl, sda;
  logic start_seen, stop_seen;

  assign scl = !(m_scl_oe || s_scl_oe);
  // refuse_at >= 0 keeps the card's SDA pull-down off the bus during that
  // frame of the transfer (0 = first byte after START), so that frame is not
  // acknowledged. The gate only changes while SCL is low.
  int  refuse_at = -1, frames = 0;
  logic refuse = 0;
  assign sda = !(m_sda_oe || (s_sda_oe && !refuse));

  i2c_master_ctrl dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .done, .nack,
    .rd_valid, .rd_data, .wr_valid, .wr_data,
    .scl_in(scl), .sda_in(sda), .scl_oe(m_scl_oe), .sda_oe(m_sda_oe));

  i2c_slave #(.ADDR7(7'h50), .ADDR10(10'h2A5), .STRETCH(40)) card (
    .clk, .rst_n, .scl_in(scl), .sda_in(sda), .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .start_seen, .stop_seen);

  logic ev_valid, ev_ack; logic [1:0] ev_kind; logic [7:0] ev_byte; int partial;
  i2c_bus_monitor mon (.clk, .scl, .sda, .ev_valid, .ev_kind, .ev_byte, .ev_ack,
                       .partial_frames(partial));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // event = {kind, byte, ack}
  typedef logic [10:0] ev_t;
  ev_t got[$], exp[$];
  logic [7:0] rd_got[$];
  always @(posedge clk) begin
    if (ev_valid && ev_kind == 2'd2) frames <= frames + 1;
    if (!scl) refuse <= (refuse_at >= 0 && frames == refuse_at);
  end
  always @(posedge clk) begin
    if (ev_valid) got.push_back({ev_kind, ev_byte, ev_ack});
    if (rd_valid) rd_got.push_back(rd_data);
  end

  logic [7:0] shadow [256];
  bit         known  [256];
  logic [7:0] ptr = 8'd0;      // the slave's word pointer

  function automatic ev_t S();                  return {2'd0, 8'h00, 1'b0}; endfunction
  function automatic ev_t P();                  return {2'd1, 8'h00, 1'b0}; endfunction
  function automatic ev_t F(logic [7:0] b, bit a); return {2'd2, b, a};    endfunction

  // Expected bus traffic; returns 0 when the address is not acknowledged.
  function automatic bit addr_w(xfer_t x, bit present);
    if (x.amode == ADDR_10BIT) begin
      exp.push_back(F({5'b11110, x.saddr[9:8], 1'b0}, present));
      if (!present) return 0;
      exp.push_back(F(x.saddr[7:0], 1'b1));
    end else begin
      exp.push_back(F({x.saddr[6:0], 1'b0}, present));
      if (!present) return 0;
    end
    return 1;
  endfunction

  logic [7:0] rd_exp[$]; bit rd_known[$];

  // Appends to the expectation unless `fresh` (the default) clears it first.
  task automatic build(xfer_t x, bit present, bit fresh = 1);
    int n = (x.nbytes == 0) ? 1 : x.nbytes;
    bit segs_read[$];
    if (fresh) begin exp.delete(); rd_exp.delete(); rd_known.delete(); end
    if (x.msg == MSG_READ && x.direct) begin
      exp.push_back(S());
      if (x.amode == ADDR_10BIT) begin
        if (!addr_w(x, present)) begin exp.push_back(P()); return; end
        exp.push_back(S());
        exp.push_back(F({5'b11110, x.saddr[9:8], 1'b1}, 1'b1));
      end else begin
        exp.push_back(F({x.saddr[6:0], 1'b1}, present));
        if (!present) begin exp.push_back(P()); return; end
      end
      for (int k = 0; k < n; k++) begin
        exp.push_back(F(shadow[8'(ptr + k)], k != n - 1));
        rd_exp.push_back(shadow[8'(ptr + k)]);
      end
      ptr = 8'(ptr + n);
      exp.push_back(P());
      return;
    end
    case (x.msg)
      MSG_WRITE:      segs_read = '{0};
      MSG_READ:       segs_read = '{1};
      MSG_WRITE_READ: segs_read = '{0, 1};
      default:        segs_read = '{1, 0};
    endcase
    foreach (segs_read[s]) begin
      exp.push_back(S());
      if (!addr_w(x, present)) break;
      exp.push_back(F(x.waddr, 1'b1));
      ptr = 8'(x.waddr + n);
      if (!segs_read[s]) begin
        for (int k = 0; k < n; k++) begin
          logic [7:0] v = pattern_value(x.pattern, x.pstart + k);
          exp.push_back(F(v, 1'b1));
          shadow[8'(x.waddr + k)] = v; known[8'(x.waddr + k)] = 1;
        end
      end else begin
        exp.push_back(S());
        if (x.amode == ADDR_10BIT) exp.push_back(F({5'b11110, x.saddr[9:8], 1'b1}, 1'b1));
        else                       exp.push_back(F({x.saddr[6:0], 1'b1}, 1'b1));
        for (int k = 0; k < n; k++) begin
          exp.push_back(F(shadow[8'(x.waddr + k)], k != n - 1));
          rd_exp.push_back(shadow[8'(x.waddr + k)]);
          rd_known.push_back(known[8'(x.waddr + k)]);
        end
      end
    end
    exp.push_back(P());
  endtask

  int min_period = 0, last_rise = -1;
  int stretch_cycles = 0;   // master has released SCL but the slave holds it low
  always @(posedge clk) if (dut.u_engine.scl_rel && !scl) stretch_cycles++;
  int ncycle = 0;
  always @(posedge clk) ncycle++;
  logic scl_q = 1;
  always @(posedge clk) begin
    if (scl && !scl_q) begin
      if (last_rise >= 0 && ncycle - last_rise < min_period) min_period = ncycle - last_rise;
      last_rise = ncycle;
    end
    scl_q <= scl;
  end

  task automatic run(xfer_t x, bit present, string name);
    build(x, present);
    execute(x, !present, name);
  endtask

  // Runs one transfer against the expectation already in exp / rd_exp.
  task automatic execute(xfer_t x, bit exp_nack, string name);
    got.delete(); rd_got.delete();
    frames = 0;
    min_period = 1 << 30; last_rise = -1;
    @(negedge clk); req = x; req_valid = 1;
    @(negedge clk); req_valid = 0;
    while (!done) @(posedge clk);
    check(nack == exp_nack, $sformatf("%s: nack flag %0d", name, nack));
    repeat (5) @(posedge clk);
    check(got.size() == exp.size(),
          $sformatf("%s: %0d bus events, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++) begin
      bit ok = (got[i] == exp[i]);
      check(ok, $sformatf("%s: event %0d got %h expected %h", name, i, got[i], exp[i]));
    end
    check(rd_got.size() == rd_exp.size(), $sformatf("%s: %0d bytes read", name, rd_got.size()));
    for (int i = 0; i < rd_got.size() && i < rd_exp.size(); i++)
      check(rd_got[i] == rd_exp[i], $sformatf("%s: read %0d = %h expected %h", name, i, rd_got[i], rd_exp[i]));
  endtask

  // Queues several transfers back to back through the transmit FIFO while
  // the first is on the bus, and checks the bus traffic of all of them. A
  // plain write followed by a plain read, or the reverse, must be joined
  // into one combined message: no STOP between them, the next START is a
  // repeated START.
  function automatic bit joins(xfer_t a, xfer_t b);
    return (a.msg == MSG_WRITE || a.msg == MSG_READ) &&
           (b.msg == MSG_WRITE || b.msg == MSG_READ) && a.msg != b.msg;
  endfunction

  int n_joined = 0, n_done = 0, n_done_nack = 0;
  always @(posedge clk) if (done) begin n_done++; if (nack) n_done_nack++; end

  task automatic queued(xfer_t xs[$], string name);
    int done0 = n_done, nack0 = n_done_nack;
    bit was_full = 0;
    got.delete(); rd_got.delete();
    foreach (xs[i]) begin
      if (i > 0 && joins(xs[i-1], xs[i])) begin
        void'(exp.pop_back());            // the STOP that is left out
        n_joined++;
      end
      build(xs[i], 1, i == 0);
    end
    foreach (xs[i]) begin
      @(negedge clk);
      while (!req_ready) begin was_full = 1; @(negedge clk); end
      req = xs[i]; req_valid = 1;
      @(negedge clk); req_valid = 0;
      if (!req_ready) was_full = 1;
    end
    check(was_full == (xs.size() > 4), $sformatf("%s: FIFO full seen %0d", name, was_full));
    while (n_done - done0 < xs.size()) @(posedge clk);
    check(n_done_nack == nack0, $sformatf("%s: %0d transfers NACKed", name, n_done_nack - nack0));
    repeat (5) @(posedge clk);
    check(got.size() == exp.size(),
          $sformatf("%s: %0d bus events, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      check(got[i] == exp[i], $sformatf("%s: event %0d got %h expected %h", name, i, got[i], exp[i]));
    check(rd_got.size() == rd_exp.size(), $sformatf("%s: %0d bytes read", name, rd_got.size()));
    for (int i = 0; i < rd_got.size() && i < rd_exp.size(); i++)
      check(rd_got[i] == rd_exp[i], $sformatf("%s: read %0d = %h expected %h", name, i, rd_got[i], rd_exp[i]));
  endtask

  function automatic xfer_t mk(msg_e m, addr_mode_e am, logic [9:0] a, logic [7:0] w,
                               int n, pattern_e p, logic [7:0] ps, speed_e sp);
    xfer_t x;
    x.msg = m; x.amode = am; x.saddr = a; x.waddr = w; x.nbytes = 8'(n);
    x.pattern = p; x.pstart = ps; x.speed = sp; x.direct = 0;
    return x;
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xfer_t x;
  xfer_t xq[$];
  initial begin
    foreach (known[i]) known[i] = 0;
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // Fill the locations later read so that every read is predictable.
    run(mk(MSG_WRITE, ADDR_7BIT, 10'h50, 8'h10, 6, PAT_INCR, 8'd0, SPEED_FAST), 1, "write7 fast");
    check(min_period == 4 * 63 + 4, $sformatf("fast SCL period %0d cycles", min_period));
    run(mk(MSG_READ, ADDR_7BIT, 10'h50, 8'h10, 6, PAT_INCR, 8'd0, SPEED_HS), 1, "read7 hs");
    check(min_period == 30 + 4, $sformatf("hs SCL period %0d cycles", min_period));
    run(mk(MSG_WRITE_READ, ADDR_10BIT, 10'h2A5, 8'hFC, 8, PAT_FIB, 8'd3, SPEED_HS), 1, "wr-rd10 fib");
    run(mk(MSG_READ_WRITE, ADDR_10BIT, 10'h2A5, 8'hFC, 5, PAT_GRAY, 8'd9, SPEED_FAST), 1, "rd-wr10 gray");
    run(mk(MSG_READ, ADDR_10BIT, 10'h2A5, 8'hFC, 5, PAT_INCR, 8'd0, SPEED_HS), 1, "read10 check gray");
    run(mk(MSG_WRITE_READ, ADDR_7BIT, 10'h50, 8'h40, 3, PAT_GRAY, 8'd14, SPEED_STD), 1, "wr-rd7 std");
    check(min_period == 4 * 250 + 4, $sformatf("std SCL period %0d cycles", min_period));
    run(mk(MSG_WRITE, ADDR_7BIT, 10'h33, 8'h00, 2, PAT_INCR, 8'd0, SPEED_HS), 0, "absent7");
    run(mk(MSG_READ, ADDR_10BIT, 10'h1A5, 8'h00, 2, PAT_INCR, 8'd0, SPEED_HS), 0, "absent10");
    run(mk(MSG_READ_WRITE, ADDR_7BIT, 10'h50, 8'h12, 1, PAT_FIB, 8'd0, SPEED_HS), 1, "rd-wr7 one byte");
    // reads without a word address continue where the last transfer ended
    run(mk(MSG_WRITE, ADDR_7BIT, 10'h50, 8'h80, 4, PAT_GRAY, 8'd5, SPEED_HS), 1, "write 80..83");
    run(mk(MSG_READ, ADDR_7BIT, 10'h50, 8'h80, 1, PAT_INCR, 8'd0, SPEED_HS), 1, "read 80");
    x = mk(MSG_READ, ADDR_7BIT, 10'h50, 8'h00, 2, PAT_INCR, 8'd0, SPEED_HS);
    x.direct = 1;
    run(x, 1, "direct read7 of 81..82");
    x = mk(MSG_READ, ADDR_10BIT, 10'h2A5, 8'h00, 1, PAT_INCR, 8'd0, SPEED_FAST);
    x.direct = 1;
    run(x, 1, "direct read10 of 83");
    x.saddr = 10'h1A5;
    run(x, 0, "direct read10 absent");
    x.saddr = 10'h33; x.amode = ADDR_7BIT;
    run(x, 0, "direct read7 absent");
    // eight transfers queued at once: the FIFO (4 deep) fills while the
    // first is on the bus, and they run in order, write/read pairs joined
    xq.delete();
    xq.push_back(mk(MSG_WRITE, ADDR_7BIT, 10'h50, 8'hC0, 2, PAT_FIB, 8'd5, SPEED_HS));
    xq.push_back(mk(MSG_READ, ADDR_10BIT, 10'h2A5, 8'hC0, 2, PAT_INCR, 8'd0, SPEED_HS));
    xq.push_back(mk(MSG_READ_WRITE, ADDR_7BIT, 10'h50, 8'hC1, 1, PAT_GRAY, 8'd6, SPEED_FAST));
    xq.push_back(mk(MSG_WRITE_READ, ADDR_10BIT, 10'h2A5, 8'hC2, 2, PAT_INCR, 8'd40, SPEED_HS));
    xq.push_back(mk(MSG_READ, ADDR_7BIT, 10'h50, 8'hC0, 4, PAT_INCR, 8'd0, SPEED_HS));
    xq.push_back(mk(MSG_WRITE, ADDR_10BIT, 10'h2A5, 8'hC8, 3, PAT_GRAY, 8'd1, SPEED_FAST));
    xq.push_back(mk(MSG_WRITE, ADDR_7BIT, 10'h50, 8'hCB, 1, PAT_INCR, 8'd9, SPEED_HS));
    xq.push_back(mk(MSG_READ, ADDR_7BIT, 10'h50, 8'hC8, 4, PAT_INCR, 8'd0, SPEED_HS));
    queued(xq, "queued eight");
    check(n_joined == 3, $sformatf("%0d pairs joined into combined messages", n_joined));
    // A refused data byte ends a write-read at once: STOP, no read segment.
    x = mk(MSG_WRITE_READ, ADDR_7BIT, 10'h50, 8'hA0, 4, PAT_INCR, 8'd7, SPEED_FAST);
    exp.delete(); rd_exp.delete();
    exp.push_back(S());
    exp.push_back(F({7'h50, 1'b0}, 1'b1));
    exp.push_back(F(8'hA0, 1'b1));
    exp.push_back(F(8'd7, 1'b1));
    exp.push_back(F(8'd8, 1'b0));
    exp.push_back(P());
    refuse_at = 3;
    execute(x, 1, "write-read with data byte 1 refused");
    refuse_at = -1;
    // the same in 10-bit mode at high speed, first data byte refused
    x = mk(MSG_WRITE, ADDR_10BIT, 10'h2A5, 8'hB0, 3, PAT_GRAY, 8'd2, SPEED_HS);
    exp.delete(); rd_exp.delete();
    exp.push_back(S());
    exp.push_back(F({5'b11110, 2'b10, 1'b0}, 1'b1));
    exp.push_back(F(8'hA5, 1'b1));
    exp.push_back(F(8'hB0, 1'b1));
    exp.push_back(F(8'd3, 1'b0));
    exp.push_back(P());
    refuse_at = 3;
    execute(x, 1, "write10 with data byte 0 refused");
    refuse_at = -1;
    check(partial == 0, "no frame cut short");
    check(stretch_cycles > 100, $sformatf("clock stretched for %0d cycles", stretch_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
