// i2c_xfer_fifo: transmit FIFO of transfer descriptors for the controller.
//
// The controller finishes a transfer, then checks this FIFO and starts the
// next descriptor waiting in it; that working order is the document's. The
// FIFO lets a producer queue up to DEPTH transfers while one is on the bus.
// Its depth (4) and structure, a circular buffer with read and write
// pointers and an occupancy counter, are this design's choice.
//
// Interface: a descriptor is written when in_valid && in_ready (in_ready =
// not full). The oldest descriptor is on `out` whenever out_valid is high
// and is removed by a one-cycle `pop`. A descriptor written into an empty
// FIFO is visible on `out` in the next cycle. `count` is the occupancy.
module i2c_xfer_fifo
  import i2c_pkg::*;
#(
  parameter int unsigned DEPTH = 4         // at least 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  xfer_t                    in,
  output logic                     out_valid,
  output xfer_t                    out,
  input  logic                     pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  xfer_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, take;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out       = mem[rp];
  assign push      = in_valid && in_ready;
  assign take      = pop && out_valid;

  // Pointers wrap at DEPTH, which need not be a power of two.
  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) if (push) mem[wp] <= in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (take) rp <= inc(rp);
      count <= count + CW'(push) - CW'(take);
    end
  end

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid);

endmodule
