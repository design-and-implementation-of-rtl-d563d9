// tb_i2c_slave: the test-card slave driven by a bit-banged master.
//
// The master here is written in the testbench with plain delays (SCL high
// and low 20 clock cycles each) and waits for SCL to go high after releasing
// it, so it honours clock stretching. It writes data at 7-bit and 10-bit
// addresses, reads it back through a repeated START, checks that wrong
// addresses, a wrong 10-bit low byte and a 10-bit read header without a
// preceding 10-bit write are refused with NACK, checks that the word
// address wraps, and that the slave holds SCL low after each byte.
`timescale 1ns/1ps
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int HALF = 20;
  localparam int STRETCH = 60;

  logic m_scl_low = 0, m_sda_low = 0, s_scl_oe, s_sda_oe, scl, sda;
  logic start_seen, stop_seen;
  assign scl = !(m_scl_low || s_scl_oe);
  assign sda = !(m_sda_low || s_sda_oe);

  i2c_slave #(.ADDR7(7'h50), .ADDR10(10'h2A5), .MEM_DEPTH(256), .STRETCH(STRETCH)) dut (
    .clk, .rst_n, .scl_in(scl), .sda_in(sda), .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .start_seen, .stop_seen);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int stretch_cycles = 0, n_start = 0, n_stop = 0;
  always @(posedge clk) begin
    if (!m_scl_low && !scl) stretch_cycles++;
    if (rst_n && start_seen) n_start++;
    if (rst_n && stop_seen) n_stop++;
  end

  task automatic wait_clk(int n); repeat (n) @(posedge clk); endtask
  task automatic scl_release();
    m_scl_low = 0;
    do @(posedge clk); while (!scl);       // clock stretching
    wait_clk(HALF);
  endtask

  task automatic bb_start();               // also a repeated START
    m_sda_low = 0; wait_clk(HALF);
    scl_release();
    m_sda_low = 1; wait_clk(HALF);
    m_scl_low = 1; wait_clk(HALF);
  endtask
  task automatic bb_stop();
    m_sda_low = 1; wait_clk(HALF);
    scl_release();
    m_sda_low = 0; wait_clk(2 * HALF);
  endtask
  // With `glitch` set, each bit carries two one-cycle spikes that the
  // slave's input filters must reject: SCL briefly released while low, and
  // for a 1 bit, SDA briefly pulled low while SCL is high (a false START
  // followed by a false STOP).
  bit glitch = 0;
  task automatic bb_bit(bit b, output bit r);
    m_sda_low = !b; wait_clk(HALF / 2);
    if (glitch) begin m_scl_low = 0; wait_clk(1); m_scl_low = 1; wait_clk(HALF - HALF / 2 - 1); end
    else wait_clk(HALF - HALF / 2);
    m_scl_low = 0;
    do @(posedge clk); while (!scl);
    wait_clk(HALF / 4);
    if (glitch && b) begin m_sda_low = 1; wait_clk(1); m_sda_low = 0; end
    else wait_clk(1);
    wait_clk(HALF / 2 - HALF / 4 - 1); r = sda; wait_clk(HALF / 2);
    m_scl_low = 1;
  endtask
  task automatic bb_write(logic [7:0] d, output bit ack);
    bit r;
    for (int i = 7; i >= 0; i--) bb_bit(d[i], r);
    bb_bit(1'b1, r);
    ack = !r;
  endtask
  task automatic bb_read(bit ack, output logic [7:0] d);
    bit r;
    for (int i = 7; i >= 0; i--) begin bb_bit(1'b1, r); d[i] = r; end
    bb_bit(!ack, r);
  endtask

  logic [7:0] ref_mem [256];
  bit ack;
  logic [7:0] d;

  // write n bytes starting at wa; addressing: 7-bit or 10-bit
  task automatic wr(bit ten, logic [7:0] wa, int n, int seed);
    bb_start();
    if (ten) begin
      bb_write({5'b11110, 2'b10, 1'b0}, ack); check(ack, "10-bit header acknowledged");
      bb_write(8'hA5, ack);                   check(ack, "10-bit low byte acknowledged");
    end else begin
      bb_write({7'h50, 1'b0}, ack);           check(ack, "7-bit address acknowledged");
    end
    bb_write(wa, ack); check(ack, "word address acknowledged");
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = 8'(seed * 37 + i * 11 + 5);
      bb_write(v, ack); check(ack, "data acknowledged");
      ref_mem[8'(wa + i)] = v;
    end
    bb_stop();
  endtask

  task automatic rd(bit ten, logic [7:0] wa, int n);
    bb_start();
    if (ten) begin
      bb_write({5'b11110, 2'b10, 1'b0}, ack); check(ack, "10-bit header acknowledged");
      bb_write(8'hA5, ack);                   check(ack, "10-bit low byte acknowledged");
    end else begin
      bb_write({7'h50, 1'b0}, ack);           check(ack, "7-bit address acknowledged");
    end
    bb_write(wa, ack); check(ack, "word address acknowledged");
    bb_start();
    if (ten) begin bb_write({5'b11110, 2'b10, 1'b1}, ack); check(ack, "10-bit read header acknowledged"); end
    else     begin bb_write({7'h50, 1'b1}, ack);           check(ack, "7-bit read address acknowledged"); end
    for (int i = 0; i < n; i++) begin
      bb_read(i != n - 1, d);
      check(d == ref_mem[8'(wa + i)],
            $sformatf("read [%0d] = %h expected %h", 8'(wa + i), d, ref_mem[8'(wa + i)]));
    end
    bb_stop();
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_clk(10);
    wr(0, 8'h20, 5, 1);
    rd(0, 8'h20, 5);
    wr(1, 8'hFD, 6, 2);                       // wraps 0xFF -> 0x00
    rd(1, 8'hFD, 6);
    rd(0, 8'h21, 3);                          // overlapping, via the 7-bit address
    // wrong 7-bit address
    bb_start(); bb_write({7'h51, 1'b0}, ack); check(!ack, "wrong 7-bit address refused"); bb_stop();
    // wrong 10-bit upper bits
    bb_start(); bb_write({5'b11110, 2'b01, 1'b0}, ack); check(!ack, "wrong A9A8 refused"); bb_stop();
    // wrong 10-bit low byte
    bb_start(); bb_write({5'b11110, 2'b10, 1'b0}, ack); check(ack, "header acknowledged");
    bb_write(8'hA4, ack); check(!ack, "wrong 10-bit low byte refused"); bb_stop();
    // 10-bit read header without a full 10-bit write address first
    bb_start(); bb_write({5'b11110, 2'b10, 1'b1}, ack); check(!ack, "bare 10-bit read refused"); bb_stop();
    // the slave is still healthy
    rd(0, 8'h20, 2);
    // a write with spikes on both lines, read back cleanly
    glitch = 1;
    wr(0, 8'h40, 4, 3);
    glitch = 0;
    rd(0, 8'h40, 4);
    // 3 writes x 1, 5 reads x 2 (START and repeated START), 4 refusal tests
    check(n_start == 3 + 10 + 4,
          $sformatf("%0d STARTs seen", n_start));
    check(n_stop == 12, $sformatf("%0d STOPs seen", n_stop));
    // about 40 bytes end in a stretch of STRETCH - HALF cycles or more
    check(stretch_cycles > 30 * (STRETCH - HALF),
          $sformatf("slave stretched SCL for %0d cycles", stretch_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
