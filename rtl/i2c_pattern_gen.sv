// i2c_pattern_gen: data-pattern source for transmitted bytes.
//
// Produces the sequence chosen by `pattern`: increment (0,1,2,...), Fibonacci
// (0,1,1,2,3,5,8,...) or Gray code (n xor n>>1 of an incrementing counter).
// All values are 8 bits: the counter wraps at 256 and the Fibonacci sums are
// taken modulo 256. The three patterns are the document's; the 8-bit
// wrap-around and the start index are this design's choices.
//
// Interface: `load` restarts the sequence and makes `start` the index of the
// first element. The generator then steps once per cycle until it reaches
// that index, with `ready` low meanwhile (at most 255 cycles). When ready,
// `data` is the current element and `next` advances to the following one in
// the same cycle.
module i2c_pattern_gen
  import i2c_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  pattern_e   pattern,
  input  logic [7:0] start,
  input  logic       next,
  output logic       ready,
  output logic [7:0] data
);

  pattern_e   pat;
  logic [7:0] idx;
  logic [7:0] fib_a, fib_b;
  logic [7:0] skip;

  assign ready = (skip == 8'd0);

  always_comb begin
    case (pat)
      PAT_FIB:  data = fib_a;
      PAT_GRAY: data = idx ^ (idx >> 1);
      default:  data = idx;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat   <= PAT_INCR;
      idx   <= '0;
      fib_a <= 8'd0;
      fib_b <= 8'd1;
      skip  <= '0;
    end else if (load) begin
      pat   <= pattern;
      idx   <= '0;
      fib_a <= 8'd0;
      fib_b <= 8'd1;
      skip  <= start;
    end else if (!ready || next) begin
      idx   <= idx + 8'd1;
      fib_a <= fib_b;
      fib_b <= fib_a + fib_b;
      if (!ready) skip <= skip - 8'd1;
    end
  end

endmodule
