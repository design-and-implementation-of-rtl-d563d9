// tb_i2c_stress_gen: one stress-test channel end to end.
//
// The stress generator drives a controller and a test-card slave for
// N_XFERS random transfers. The testbench checks each request it issues for
// legal field values, predicts and checks every transfer's bus traffic with
// i2c_xfer_checker, and recomputes the generator's counters (transfers,
// NACKed transfers, bytes moved) from the requests. It flips one bit of one
// read-back byte on its way to the generator and expects exactly one
// mismatch to be counted. Every message type, addressing mode, pattern and
// speed, a read without word address, and at least one NACK, must occur.
`timescale 1ns/1ps
module tb_i2c_stress_gen;
  import i2c_pkg::*;

  localparam int N_XFERS = 48;
  localparam int MAXN    = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 0;
  logic req_valid, req_ready, done, nack, rd_valid, wr_valid, finished;
  xfer_t req;
  logic [7:0] rd_data, wr_data, rd_data_to_gen;
  logic [31:0] xfer_count, nack_count, mismatch_count, byte_count;
  logic m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, scl, sda, start_seen, stop_seen;
  logic corrupt;

  assign scl = !(m_scl_oe || s_scl_oe);
  assign sda = !(m_sda_oe || s_sda_oe);
  assign rd_data_to_gen = rd_data ^ {7'd0, corrupt};

  i2c_stress_gen #(.SEED(32'hC0FFEE11), .SLV_ADDR7(7'h50), .SLV_ADDR10(10'h2A5),
                   .MAX_NBYTES(MAXN)) dut (
    .clk, .rst_n, .enable, .n_xfers(32'(N_XFERS)),
    .req_valid, .req, .req_ready, .done, .nack, .rd_valid, .rd_data(rd_data_to_gen), .wr_valid,
    .xfer_count, .nack_count, .mismatch_count, .byte_count, .finished);

  i2c_master_ctrl ctrl (
    .clk, .rst_n, .req_valid, .req, .req_ready, .done, .nack,
    .rd_valid, .rd_data, .wr_valid, .wr_data,
    .scl_in(scl), .sda_in(sda), .scl_oe(m_scl_oe), .sda_oe(m_sda_oe));

  i2c_slave #(.ADDR7(7'h50), .ADDR10(10'h2A5), .STRETCH(100)) card (
    .clk, .rst_n, .scl_in(scl), .sda_in(sda), .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .start_seen, .stop_seen);

  int c_checks, c_fail, n_msg[4], n_amode[2], n_pat[3], n_speed[3], n_nack, n_restart, n_direct;
  logic flush = 0;
  i2c_xfer_checker #(.ADDR7(7'h50), .ADDR10(10'h2A5)) chk (
    .clk, .accept(req_valid && req_ready), .req, .flush, .scl, .sda,
    .checks(c_checks), .failures(c_fail), .n_msg, .n_amode, .n_pat, .n_speed,
    .n_nack, .n_restart, .n_direct);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected counters from the requests alone.
  int exp_nack = 0, exp_bytes = 0, n_req = 0;
  msg_e cur_msg;
  bit   cur_wrote;
  bit   corrupted = 0;
  always @(posedge clk) begin
    if (req_valid && req_ready) begin
      bit present;
      int n;
      n_req++;
      present = (req.amode == ADDR_10BIT) ? (req.saddr == 10'h2A5) : (req.saddr[6:0] == 7'h50);
      check(req.nbytes >= 1 && req.nbytes <= MAXN, $sformatf("nbytes %0d", req.nbytes));
      check(req.pattern != 2'd3 && req.speed != 2'd3, "pattern and speed legal");
      check(present || (req.amode == ADDR_10BIT ? req.saddr == 10'h15A : req.saddr[6:0] == 7'h3C),
            $sformatf("slave address %h", req.saddr));
      n = req.nbytes;
      if (!present) exp_nack++;
      else exp_bytes += (req.msg == MSG_WRITE_READ || req.msg == MSG_READ_WRITE) ? 2 * n : n;
      cur_msg = req.msg; cur_wrote = 0;
    end
    if (wr_valid) cur_wrote = 1;
  end
  // flip bit 0 of the first read-back byte after transfer 20
  assign corrupt = !corrupted && n_req > 20 && cur_msg == MSG_WRITE_READ && cur_wrote && rd_valid;
  always @(posedge clk) if (corrupt) corrupted <= 1;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    enable = 1;
    while (!finished) @(posedge clk);
    repeat (10) @(posedge clk);
    flush = 1; @(posedge clk); flush = 0;
    repeat (10) @(posedge clk);
    check(!req_valid, "no request after the last transfer");
    check(xfer_count == N_XFERS && n_req == N_XFERS, $sformatf("%0d transfers, %0d requests", xfer_count, n_req));
    check(nack_count == exp_nack && n_nack == exp_nack,
          $sformatf("nack count %0d, bus NACKs %0d, expected %0d", nack_count, n_nack, exp_nack));
    check(byte_count == exp_bytes, $sformatf("bytes %0d expected %0d", byte_count, exp_bytes));
    check(corrupted, "a read-back byte was corrupted");
    check(mismatch_count == 32'(corrupted), $sformatf("mismatches %0d", mismatch_count));
    foreach (n_msg[i])   check(n_msg[i] > 0,   $sformatf("message type %0d used", i));
    foreach (n_amode[i]) check(n_amode[i] > 0, $sformatf("addressing mode %0d used", i));
    foreach (n_pat[i])   check(n_pat[i] > 0,   $sformatf("pattern %0d used", i));
    foreach (n_speed[i]) check(n_speed[i] > 0, $sformatf("speed %0d used", i));
    check(exp_nack > 0, "an absent slave was addressed");
    check(n_restart > 0, "repeated STARTs seen");
    check(n_direct > 0, "reads without word address");
    $display("transfers=%0d nacks=%0d bytes=%0d restarts=%0d", xfer_count, nack_count, byte_count, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_fail);
    $finish;
  end
endmodule
