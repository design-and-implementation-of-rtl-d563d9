// i2c_input_filter: synchroniser and spike filter for an SCL or SDA input.
//
// The pad level is first brought into the clock domain by two flip-flops.
// The filtered output then follows it only after the synchronised level has
// been the same for SPIKE_CYCLES + 1 consecutive cycles, so a pulse of up to
// SPIKE_CYCLES cycles is suppressed. Spike suppression at the SDA and SCL
// inputs of high-speed devices is the document's; the way it is done here,
// and its default of one cycle (10 ns at 100 MHz), are this design's choice.
//
// Timing: a clean edge reaches `q` SPIKE_CYCLES + 3 clock edges after the
// pad, 4 with the default (2 more than a plain synchroniser). SPIKE_CYCLES
// must be at least 1. The output resets to 1, the idle level of the bus.
module i2c_input_filter #(
  parameter int unsigned SPIKE_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [1:0]              sync;
  logic [SPIKE_CYCLES-1:0] hist;     // previous synchronised samples
  logic [SPIKE_CYCLES:0]   win;      // the last SPIKE_CYCLES + 1 samples

  assign win = {hist, sync[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11;
      hist <= '1;
      q    <= 1'b1;
    end else begin
      sync <= {sync[0], d};
      hist <= win[SPIKE_CYCLES-1:0];
      if (&win)       q <= 1'b1;
      else if (~|win) q <= 1'b0;
    end
  end

endmodule
