// i2c_bus_monitor: testbench-only decoder of one I2C bus.
//
// Watches SCL and SDA on every clock edge and reports what it sees, one
// event per cycle at most: a START (kind 0; also repeated START), a STOP
// (kind 1), or a complete 9-bit frame (kind 2) with the 8 data bits and the
// level of the 9th bit (ack = 1 when SDA was low, i.e. acknowledged).
// partial_frames counts frames cut short by a START or STOP after more than
// one bit: a sign that SDA moved while SCL was high in the middle of a byte.
module i2c_bus_monitor (
  input  logic       clk,
  input  logic       scl,
  input  logic       sda,
  output logic       ev_valid,
  output logic [1:0] ev_kind,
  output logic [7:0] ev_byte,
  output logic       ev_ack,
  output int         partial_frames
);
  logic       scl_q = 1'b1, sda_q = 1'b1;
  int         nbits = 0;
  logic [8:0] sh = '0;

  initial begin
    partial_frames = 0;
    ev_valid = 1'b0;
    ev_kind  = 2'd0;
    ev_byte  = 8'd0;
    ev_ack   = 1'b0;
  end

  always @(posedge clk) begin
    ev_valid <= 1'b0;
    if (scl && scl_q && sda_q && !sda) begin
      ev_valid <= 1'b1; ev_kind <= 2'd0; ev_byte <= '0; ev_ack <= 1'b0;
      if (nbits > 1) partial_frames <= partial_frames + 1;
      nbits = 0;
    end else if (scl && scl_q && !sda_q && sda) begin
      ev_valid <= 1'b1; ev_kind <= 2'd1; ev_byte <= '0; ev_ack <= 1'b0;
      if (nbits > 1) partial_frames <= partial_frames + 1;
      nbits = 0;
    end else if (scl && !scl_q) begin
      sh = {sh[7:0], sda};
      nbits++;
      if (nbits == 9) begin
        ev_valid <= 1'b1; ev_kind <= 2'd2;
        ev_byte  <= sh[8:1];
        ev_ack   <= !sh[0];
        nbits = 0;
      end
    end
    scl_q <= scl;
    sda_q <= sda;
  end
endmodule
