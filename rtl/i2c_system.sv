// i2c_system: FPGA I2C masters and their test cards, wired as a stress-test
// bench.
//
// N_CTRL independent channels run side by side. In each one a stress
// generator (i2c_stress_gen) drives an I2C controller (i2c_master_ctrl),
// whose open-drain SCL and SDA form a bus with one test-card slave
// (i2c_slave). The pull-up resistors are modelled as a wired AND: a line is
// high unless some device pulls it low. The bus lines are brought out so that
// a logic analyser, or a testbench, can watch them.
// Three controllers, a test card standing in for the real device, and
// randomised long-running traffic are what the document describes. One bus
// per controller, the addresses and the per-channel seeds are this design's
// choices: channel i's slave answers at 7-bit 0x50+i and 10-bit 0x2A5+i.
//
// Interface: hold `enable` high to run; each channel stops after `n_xfers`
// transfers (0 = never). Per channel it reports completed transfers, NACKed
// transfers (packet loss), read-back mismatches and bytes moved.
module i2c_system
  import i2c_pkg::*;
#(
  parameter int unsigned N_CTRL     = 3,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned MAX_NBYTES = 16,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned STRETCH    = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [31:0]       n_xfers,
  output logic [31:0]       xfer_count     [N_CTRL],
  output logic [31:0]       nack_count     [N_CTRL],
  output logic [31:0]       mismatch_count [N_CTRL],
  output logic [31:0]       byte_count     [N_CTRL],
  output logic [N_CTRL-1:0] finished,
  output logic [N_CTRL-1:0] scl,
  output logic [N_CTRL-1:0] sda
);

  for (genvar i = 0; i < N_CTRL; i++) begin : g_ch
    localparam logic [6:0] A7  = 7'(7'h50 + i);
    localparam logic [9:0] A10 = 10'(10'h2A5 + i);

    logic       req_valid, req_ready, done, nack;
    xfer_t      req;
    logic       rd_valid, wr_valid;
    logic [7:0] rd_data, wr_data;
    logic       m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe;
    logic       start_seen, stop_seen;

    // pull-ups: wired AND of the open-drain drivers
    assign scl[i] = !(m_scl_oe || s_scl_oe);
    assign sda[i] = !(m_sda_oe || s_sda_oe);

    i2c_stress_gen #(
      .SEED       (32'h1D2C_3B4A ^ (32'(i) * 32'h9E37_79B9)),
      .SLV_ADDR7  (A7),
      .SLV_ADDR10 (A10),
      .MAX_NBYTES (MAX_NBYTES)
    ) u_stress (
      .clk, .rst_n, .enable, .n_xfers,
      .req_valid, .req, .req_ready, .done, .nack, .rd_valid, .rd_data, .wr_valid,
      .xfer_count     (xfer_count[i]),
      .nack_count     (nack_count[i]),
      .mismatch_count (mismatch_count[i]),
      .byte_count     (byte_count[i]),
      .finished       (finished[i])
    );

    i2c_master_ctrl #(.CLK_HZ(CLK_HZ)) u_ctrl (
      .clk, .rst_n, .req_valid, .req, .req_ready, .done, .nack,
      .rd_valid, .rd_data, .wr_valid, .wr_data,
      .scl_in (scl[i]),
      .sda_in (sda[i]),
      .scl_oe (m_scl_oe),
      .sda_oe (m_sda_oe)
    );

    i2c_slave #(
      .ADDR7     (A7),
      .ADDR10    (A10),
      .MEM_DEPTH (MEM_DEPTH),
      .STRETCH   (STRETCH)
    ) u_card (
      .clk, .rst_n,
      .scl_in (scl[i]),
      .sda_in (sda[i]),
      .scl_oe (s_scl_oe),
      .sda_oe (s_sda_oe),
      .start_seen,
      .stop_seen
    );
  end

endmodule
