// i2c_byte_engine: bit- and byte-level I2C master.
//
// It executes one command at a time on an open-drain bus: START (a repeated
// START when the bus is already held), write one byte and sample the
// receiver's acknowledge, read one byte and answer with ACK or NACK, and STOP.
// Each bit takes four phases timed by i2c_scl_timer:
//   phase 0  SCL low,      SDA held from the previous bit
//   phase 1  SCL low,      SDA set to the new bit (data may change only
//                          while SCL is low)
//   phase 2  SCL released; the phase starts only once SCL is seen high, so a
//                          slave that holds SCL low stretches the clock;
//                          SDA is sampled at the end of this phase
//   phase 3  SCL high;     SCL is pulled low at its end
// A repeated START spends two phases with SCL low and SDA released, then
// releases SCL, drops SDA and pulls SCL low again, one phase each.
// A byte is eight data bits, MSB first, and a ninth acknowledge bit in which
// the transmitter releases SDA and the receiver pulls it low for ACK.
// START drops SDA while SCL is high; STOP raises SDA while SCL is high.
// These bus rules follow the document; the four-phase split and the
// command handshake are this design's own.
//
// Interface: a command is taken when cmd_valid is high while cmd_ready is
// high. `done` pulses for one cycle when it finishes; then `ack_rcvd`
// (after a write) or `rdata` (after a read) is valid. scl_oe/sda_oe are
// registered pull-down enables for the open-drain pads; scl_in/sda_in are the
// pad inputs, synchronised and spike-filtered here (i2c_input_filter).
// Timing: a byte takes 36 phases, START 4 (5 when repeated) and STOP 4.
// Every release of SCL adds the input filter's delay (4 cycles with the
// default SPIKE_CYCLES = 1) before the high phase is timed, plus any time a
// slave stretches SCL, so an SCL period is 4 phases + 4 cycles: 1004, 256
// and 34 cycles at 100 MHz (99.6 kHz, 390.6 kHz, 2.94 MHz).
module i2c_byte_engine
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned SPIKE_CYCLES = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  speed_e     speed,
  input  logic       cmd_valid,
  input  cmd_e       cmd,
  input  logic [7:0] wdata,
  input  logic       send_ack,   // for CMD_READ: 1 = ACK, 0 = NACK
  output logic       cmd_ready,
  output logic       done,
  output logic [7:0] rdata,
  output logic       ack_rcvd,   // after CMD_WRITE: receiver pulled SDA low
  output logic       bus_held,   // between START and STOP
  input  logic       scl_in,
  input  logic       sda_in,
  output logic       scl_oe,
  output logic       sda_oe
);

  logic       busy;
  cmd_e       op;
  logic [1:0] ph;
  logic [3:0] bitn;
  logic [7:0] sh;
  logic       ack_out;
  logic       ext;        // repeated START: first of its two low phases done
  logic       scl_rel, sda_rel;
  logic       scl_s, sda_s;
  logic       tick, run;

  i2c_input_filter #(.SPIKE_CYCLES(SPIKE_CYCLES)) u_scl_filt (
    .clk, .rst_n, .d(scl_in), .q(scl_s));
  i2c_input_filter #(.SPIKE_CYCLES(SPIKE_CYCLES)) u_sda_filt (
    .clk, .rst_n, .d(sda_in), .q(sda_s));

  // Hold the timer while SCL is released but still low (clock stretching).
  assign run = busy && !(scl_rel && !scl_s);

  i2c_scl_timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk      (clk),
    .rst_n    (rst_n),
    .speed    (speed),
    .run      (run),
    .scl_high (scl_rel),
    .tick     (tick)
  );

  assign cmd_ready = !busy;
  assign scl_oe    = !scl_rel;
  assign sda_oe    = !sda_rel;

  // SDA level for the current data/ack bit.
  logic bit_val;
  always_comb begin
    if (op == CMD_WRITE) bit_val = (bitn < 4'd8) ? sh[7] : 1'b1;
    else                 bit_val = (bitn < 4'd8) ? 1'b1  : !ack_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      op       <= CMD_STOP;
      ph       <= '0;
      bitn     <= '0;
      sh       <= '0;
      ack_out  <= 1'b0;
      ext      <= 1'b0;
      scl_rel  <= 1'b1;
      sda_rel  <= 1'b1;
      done     <= 1'b0;
      rdata    <= '0;
      ack_rcvd <= 1'b0;
      bus_held <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy    <= 1'b1;
          op      <= cmd;
          ph      <= '0;
          bitn    <= '0;
          sh      <= wdata;
          ack_out <= send_ack;
          ext     <= 1'b0;
          if (cmd == CMD_START) sda_rel <= 1'b1;
          if (cmd == CMD_STOP)  sda_rel <= 1'b0;
        end
      end else if (tick) begin
        ph <= ph + 2'd1;
        unique case (op)
          CMD_START: begin
            unique case (ph)
              2'd0: begin
                // a repeated START keeps SCL low for two phases, as a bit does
                if (!scl_rel && !ext) begin ext <= 1'b1; ph <= 2'd0; end
                else scl_rel <= 1'b1;
              end
              2'd1: sda_rel <= 1'b0;           // SDA falls while SCL high
              2'd2: scl_rel <= 1'b0;
              2'd3: begin busy <= 1'b0; done <= 1'b1; bus_held <= 1'b1; end
            endcase
          end
          CMD_STOP: begin
            unique case (ph)
              2'd0: ;
              2'd1: scl_rel <= 1'b1;
              2'd2: sda_rel <= 1'b1;           // SDA rises while SCL high
              2'd3: begin busy <= 1'b0; done <= 1'b1; bus_held <= 1'b0; end
            endcase
          end
          default: begin                       // CMD_WRITE, CMD_READ
            unique case (ph)
              2'd0: sda_rel <= bit_val;
              2'd1: scl_rel <= 1'b1;
              2'd2: begin                      // sample at the end of SCL high/2
                if (bitn < 4'd8) begin
                  sh    <= {sh[6:0], 1'b0};
                  rdata <= {rdata[6:0], sda_s};
                end else if (op == CMD_WRITE) begin
                  ack_rcvd <= !sda_s;
                end
              end
              2'd3: begin
                scl_rel <= 1'b0;
                if (bitn == 4'd8) begin
                  busy <= 1'b0;
                  done <= 1'b1;
                end else begin
                  bitn <= bitn + 4'd1;
                end
              end
            endcase
          end
        endcase
      end
    end
  end

  // A command is only issued while the engine is idle.
  a_cmd_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> cmd_ready);

endmodule
