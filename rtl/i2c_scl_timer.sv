// i2c_scl_timer: quarter-bit timing for the I2C master.
//
// Every bit on the bus is built from four phases: two with SCL low and two
// with SCL high. This timer emits a one-cycle `tick` at the end of each phase
// while `run` is high; the byte engine moves to its next phase on each tick.
// The phase length is chosen by the selected speed grade:
//   standard 100 kHz and fast 400 kHz: four equal phases, SCL high:low = 1:1;
//   high speed 3.4 MHz: SCL low phases twice the length of the high phases,
//   giving the 1:2 high:low ratio the document gives for high-speed masters.
// Lengths are rounded up, so the bus never runs faster than its grade
// (with CLK_HZ = 100 MHz: 250, 63 and 10/5 cycles per phase, i.e.
// 100 kHz, 396.8 kHz and 3.33 MHz).
// Dropping `run` clears the count; the engine does so while it waits for a
// slave that stretches SCL, so the high time is measured from the moment SCL
// is really high. The system clock frequency is this design's assumption.
module i2c_scl_timer
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  speed_e speed,
  input  logic   run,        // count while high, cleared while low
  input  logic   scl_high,   // current phase has SCL released (high)
  output logic   tick
);

  localparam int unsigned STD_Q   = (CLK_HZ + 4*100_000 - 1) / (4*100_000);
  localparam int unsigned FAST_Q  = (CLK_HZ + 4*400_000 - 1) / (4*400_000);
  localparam int unsigned HS_LOW  = (CLK_HZ + 3*3_400_000 - 1) / (3*3_400_000);
  localparam int unsigned HS_HIGH = (CLK_HZ + 6*3_400_000 - 1) / (6*3_400_000);

  logic [15:0] count;
  logic [15:0] limit;

  always_comb begin
    case (speed)
      SPEED_FAST: limit = 16'(FAST_Q);
      SPEED_HS:   limit = scl_high ? 16'(HS_HIGH) : 16'(HS_LOW);
      default:    limit = 16'(STD_Q);
    endcase
  end

  assign tick = run && (count >= limit - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (!run)     count <= '0;
    else if (tick)     count <= '0;
    else               count <= count + 16'd1;
  end

endmodule
