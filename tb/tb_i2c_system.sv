// tb_i2c_system: the whole stress-test bench at its default size.
//
// Three controllers run random transfers at the same time, each on its own
// bus to its own test card. For every channel the testbench predicts and
// checks each transfer's bus traffic (i2c_xfer_checker), and at the end
// checks the channel's counters: all transfers done, NACK count equal to the
// refused addresses seen on the bus, no read-back mismatch. It counts how
// often each mechanism happened and fails if any never did: the four message
// types, both addressing modes, the three patterns and the three speeds, a
// read without word address, a
// refused (absent) slave, a repeated START, clock stretching by the test
// card, and the three channels busy at the same time.
`timescale 1ns/1ps
module tb_i2c_system;
  import i2c_pkg::*;

  localparam int N = 3;
  localparam int N_XFERS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 0;
  logic [31:0] xfer_count [N], nack_count [N], mismatch_count [N], byte_count [N];
  logic [N-1:0] finished, scl, sda;

  i2c_system dut (
    .clk, .rst_n, .enable, .n_xfers(32'(N_XFERS)),
    .xfer_count, .nack_count, .mismatch_count, .byte_count, .finished, .scl, .sda);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic flush = 0;
  int c_checks [N], c_fail [N], n_nack [N], n_restart [N], n_direct [N];
  int n_msg [N][4], n_amode [N][2], n_pat [N][3], n_speed [N][3];
  int stretch [N];
  logic [N-1:0] busy;

  for (genvar i = 0; i < N; i++) begin : g_chk
    i2c_xfer_checker #(.ADDR7(7'(7'h50 + i)), .ADDR10(10'(10'h2A5 + i))) chk (
      .clk,
      .accept (dut.g_ch[i].req_valid && dut.g_ch[i].req_ready),
      .req    (dut.g_ch[i].req),
      .flush, .scl(scl[i]), .sda(sda[i]),
      .checks(c_checks[i]), .failures(c_fail[i]),
      .n_msg(n_msg[i]), .n_amode(n_amode[i]), .n_pat(n_pat[i]), .n_speed(n_speed[i]),
      .n_nack(n_nack[i]), .n_restart(n_restart[i]), .n_direct(n_direct[i]));
    initial stretch[i] = 0;
    always @(posedge clk)
      if (!dut.g_ch[i].m_scl_oe && !scl[i]) stretch[i]++;
    assign busy[i] = dut.g_ch[i].u_ctrl.e_held;     // between START and STOP
  end

  int overlap = 0;
  always @(posedge clk) if (&busy) overlap++;

  int total_checks, total_fail;
  task automatic report();
    total_checks = checks; total_fail = failures;
    for (int i = 0; i < N; i++) begin
      total_checks += c_checks[i];
      total_fail   += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
  endtask

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(&scl && &sda, "buses idle after reset");
    enable = 1;
    while (!(&finished)) @(posedge clk);
    repeat (10) @(posedge clk);
    flush = 1; @(posedge clk); flush = 0;
    repeat (10) @(posedge clk);
    check(&scl && &sda, "buses idle at the end");
    for (int i = 0; i < N; i++) begin
      int tm, ta, tp, ts;
      tm = 0; ta = 0; tp = 0; ts = 0;
      check(xfer_count[i] == N_XFERS, $sformatf("ch%0d: %0d transfers", i, xfer_count[i]));
      check(nack_count[i] == 32'(n_nack[i]),
            $sformatf("ch%0d: %0d NACKed transfers, %0d refused addresses on the bus",
                      i, nack_count[i], n_nack[i]));
      check(mismatch_count[i] == 0, $sformatf("ch%0d: %0d mismatches", i, mismatch_count[i]));
      check(byte_count[i] > 0, $sformatf("ch%0d: bytes moved", i));
      foreach (n_msg[i][k])   begin tm += n_msg[i][k];   check(n_msg[i][k] > 0,   $sformatf("ch%0d message type %0d", i, k)); end
      foreach (n_amode[i][k]) begin ta += n_amode[i][k]; check(n_amode[i][k] > 0, $sformatf("ch%0d addressing mode %0d", i, k)); end
      foreach (n_pat[i][k])   begin tp += n_pat[i][k];   check(n_pat[i][k] > 0,   $sformatf("ch%0d pattern %0d", i, k)); end
      foreach (n_speed[i][k]) begin ts += n_speed[i][k]; check(n_speed[i][k] > 0, $sformatf("ch%0d speed %0d", i, k)); end
      check(tm == N_XFERS && ta == N_XFERS && tp == N_XFERS && ts == N_XFERS, "every request classified");
      check(n_nack[i] > 0,    $sformatf("ch%0d: absent slave addressed", i));
      check(n_restart[i] > 0, $sformatf("ch%0d: repeated START", i));
      check(n_direct[i] > 0,  $sformatf("ch%0d: read without word address", i));
      check(stretch[i] > 0,   $sformatf("ch%0d: clock stretching", i));
      $display("ch%0d: transfers=%0d nack=%0d bytes=%0d restarts=%0d stretch_cycles=%0d msg=%0d/%0d/%0d/%0d speed=%0d/%0d/%0d",
               i, xfer_count[i], nack_count[i], byte_count[i], n_restart[i], stretch[i],
               n_msg[i][0], n_msg[i][1], n_msg[i][2], n_msg[i][3],
               n_speed[i][0], n_speed[i][1], n_speed[i][2]);
    end
    check(overlap > 0, $sformatf("all channels busy together for %0d cycles", overlap));
    report();
    $finish;
  end
endmodule
