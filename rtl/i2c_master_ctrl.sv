// i2c_master_ctrl: I2C controller that runs queued transfers one after another.
//
// A transfer (i2c_pkg::xfer_t) is made of one or two segments joined by a
// repeated START and closed by a STOP:
//   write segment  S  ADDR+W  A  WADDR  A  D0 A ... Dn-1 A
//   read segment   S  ADDR+W  A  WADDR  A  Sr ADDR+R A  D0 A ... Dn-1 NA
//   MSG_WRITE      = write segment,             then P
//   MSG_READ       = read segment,              then P
//   MSG_WRITE_READ = write segment, Sr, read segment,  then P
//   MSG_READ_WRITE = read segment,  Sr, write segment, then P
// A MSG_READ with `direct` set reads from wherever the slave's word pointer
// stands, without a word address:
//   7-bit          S  ADDR+R A  D0 A ... Dn-1 NA  P
//   10-bit         S  ADDR+W A  Sr ADDR+R A  D0 A ... Dn-1 NA  P
// ADDR is one byte {A6..A0, R/W} in 7-bit mode, and two bytes
// {11110, A9, A8, R/W} {A7..A0} in 10-bit mode; after a repeated START that
// turns a 10-bit write into a read only the first byte, with R/W = 1, is
// sent. Every byte sent must be acknowledged; the master answers each byte it
// reads with ACK and the last one with NACK. Data bytes sent come from
// i2c_pattern_gen, starting at element `pstart` of the chosen pattern, and the
// slave stores them from word address WADDR upwards. A missing ACK (no such
// slave, or a slave that refuses data) ends the transfer at once with a STOP
// and sets `nack`.
// The message types, addressing formats and the word address follow the
// document; how the segments are built into each message type is this
// design's reading of its figures.
//
// Transfers wait in a transmit FIFO (i2c_xfer_fifo, FIFO_DEPTH entries).
// When one transfer ends the controller checks the FIFO and starts the next.
// If the transfer just ended is a plain MSG_WRITE or MSG_READ and the next
// queued one is a plain transfer of the other direction, the two are joined
// into a combined message: a repeated START replaces the STOP, and the bus
// is not released in between (AUTO_COMBINE = 1). Both rules are the
// document's; limiting the joining to plain transfers that are already
// queued when the last byte ends is this design's choice. `done` still
// pulses once per transfer. A transfer that ends with NACK always sends STOP.
//
// Interface: a transfer is queued when req_valid is high while req_ready
// (FIFO not full) is high. The bus starts it two cycles later at the
// earliest. Each byte read appears on rd_data with a one-cycle rd_valid, each
// byte written on wr_data with wr_valid. `done` pulses once at the end with
// `nack` valid. scl_oe/sda_oe/scl_in/sda_in connect to open-drain pads.
module i2c_master_ctrl
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          AUTO_COMBINE = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  xfer_t      req,
  output logic       req_ready,
  output logic       done,
  output logic       nack,
  output logic       rd_valid,
  output logic [7:0] rd_data,
  output logic       wr_valid,
  output logic [7:0] wr_data,
  input  logic       scl_in,
  input  logic       sda_in,
  output logic       scl_oe,
  output logic       sda_oe
);

  typedef enum logic [3:0] {
    C_IDLE, C_START, C_ADDR_HI, C_ADDR_LO, C_WADDR, C_WDATA,
    C_RSTART, C_RADDR, C_RDATA, C_STOP, C_DONE, C_CHAIN
  } cstate_e;

  cstate_e    st;
  xfer_t      x;
  logic       seg;        // 0: first segment, 1: second
  logic       waiting;    // command issued, waiting for the engine
  logic [7:0] cnt;        // data bytes left in this segment

  // engine side
  logic       e_valid, e_ready, e_done, e_ack, e_send_ack;
  cmd_e       e_cmd;
  logic [7:0] e_wdata, e_rdata;
  logic       e_held;

  // pattern side
  logic       pg_load, pg_next, pg_ready;
  logic [7:0] pg_data;

  // transmit FIFO
  logic  q_valid, q_pop;
  xfer_t q_xfer;
  logic [$clog2(FIFO_DEPTH+1)-1:0] q_count;

  logic seg_read, two_segs, last_seg, direct_rd;
  always_comb begin
    direct_rd = x.direct && (x.msg == MSG_READ);
    two_segs = (x.msg == MSG_WRITE_READ) || (x.msg == MSG_READ_WRITE);
    if (!seg) seg_read = (x.msg == MSG_READ) || (x.msg == MSG_READ_WRITE);
    else      seg_read = (x.msg == MSG_WRITE_READ);
    last_seg = !two_segs || seg;
  end

  // Join the next queued transfer with a repeated START instead of a STOP?
  logic chain;
  always_comb begin
    chain = AUTO_COMBINE && q_valid
         && (x.msg == MSG_WRITE || x.msg == MSG_READ)
         && (q_xfer.msg == MSG_WRITE || q_xfer.msg == MSG_READ)
         && (x.msg != q_xfer.msg);
  end

  // Command for the current state.
  always_comb begin
    e_cmd      = CMD_WRITE;
    e_wdata    = 8'h00;
    e_send_ack = 1'b1;
    e_valid    = 1'b0;
    case (st)
      C_START, C_RSTART: begin e_cmd = CMD_START; e_valid = 1'b1; end
      C_ADDR_HI: begin
        e_valid = 1'b1;
        e_wdata = (x.amode == ADDR_10BIT) ? {TEN_BIT_PREFIX, x.saddr[9:8], 1'b0}
                                           : {x.saddr[6:0], 1'b0};
      end
      C_ADDR_LO: begin e_valid = 1'b1; e_wdata = x.saddr[7:0]; end
      C_WADDR:   begin e_valid = 1'b1; e_wdata = x.waddr; end
      C_WDATA:   begin e_valid = pg_ready; e_wdata = pg_data; end
      C_RADDR: begin
        e_valid = 1'b1;
        e_wdata = (x.amode == ADDR_10BIT) ? {TEN_BIT_PREFIX, x.saddr[9:8], 1'b1}
                                           : {x.saddr[6:0], 1'b1};
      end
      C_RDATA: begin
        e_valid    = 1'b1;
        e_cmd      = CMD_READ;
        e_send_ack = (cnt != 8'd1);
      end
      C_STOP: begin e_valid = 1'b1; e_cmd = CMD_STOP; end
      default: ;
    endcase
    if (waiting) e_valid = 1'b0;
  end

  i2c_byte_engine #(.CLK_HZ(CLK_HZ)) u_engine (
    .clk      (clk),
    .rst_n    (rst_n),
    .speed    (x.speed),
    .cmd_valid(e_valid && e_ready),
    .cmd      (e_cmd),
    .wdata    (e_wdata),
    .send_ack (e_send_ack),
    .cmd_ready(e_ready),
    .done     (e_done),
    .rdata    (e_rdata),
    .ack_rcvd (e_ack),
    .bus_held (e_held),
    .scl_in   (scl_in),
    .sda_in   (sda_in),
    .scl_oe   (scl_oe),
    .sda_oe   (sda_oe)
  );


  i2c_xfer_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (req_valid),
    .in_ready (req_ready),
    .in       (req),
    .out_valid(q_valid),
    .out      (q_xfer),
    .pop      (q_pop),
    .count    (q_count)
  );

  assign q_pop   = ((st == C_IDLE) && q_valid) || (st == C_CHAIN);
  assign pg_load = q_pop;
  assign pg_next = (st == C_WDATA) && e_done;

  i2c_pattern_gen u_pattern (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (pg_load),
    .pattern(q_xfer.pattern),
    .start  (q_xfer.pstart),
    .next   (pg_next),
    .ready  (pg_ready),
    .data   (pg_data)
  );

  assign rd_data   = e_rdata;
  assign wr_data   = e_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      x        <= '0;
      seg      <= 1'b0;
      waiting  <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
      nack     <= 1'b0;
      rd_valid <= 1'b0;
      wr_valid <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_valid <= 1'b0;
      wr_valid <= 1'b0;
      if (e_valid && e_ready) waiting <= 1'b1;
      if (e_done)             waiting <= 1'b0;

      case (st)
        C_IDLE: if (q_valid) begin
          x    <= q_xfer;
          seg  <= 1'b0;
          nack <= 1'b0;
          st   <= C_START;
        end
        C_START: if (e_done) begin
          cnt <= (x.nbytes == 8'd0) ? 8'd1 : x.nbytes;
          st  <= (direct_rd && x.amode == ADDR_7BIT) ? C_RADDR : C_ADDR_HI;
        end
        C_ADDR_HI: if (e_done) begin
          if (!e_ack)                       begin nack <= 1'b1; st <= C_STOP; end
          else if (x.amode == ADDR_10BIT)   st <= C_ADDR_LO;
          else                              st <= C_WADDR;
        end
        C_ADDR_LO: if (e_done) begin
          if (!e_ack)         begin nack <= 1'b1; st <= C_STOP; end
          else if (direct_rd) st <= C_RSTART;
          else                st <= C_WADDR;
        end
        C_WADDR: if (e_done) begin
          if (!e_ack)        begin nack <= 1'b1; st <= C_STOP; end
          else if (seg_read) st <= C_RSTART;
          else               st <= C_WDATA;
        end
        C_WDATA: if (e_done) begin
          wr_valid <= 1'b1;
          cnt      <= cnt - 8'd1;
          if (!e_ack) begin nack <= 1'b1; st <= C_STOP; end
          else if (cnt == 8'd1) begin
            if (last_seg) st <= chain ? C_CHAIN : C_STOP;
            else begin seg <= 1'b1; st <= C_START; end
          end
        end
        C_RSTART: if (e_done) st <= C_RADDR;
        C_RADDR: if (e_done) begin
          if (!e_ack) begin nack <= 1'b1; st <= C_STOP; end
          else        st <= C_RDATA;
        end
        C_RDATA: if (e_done) begin
          rd_valid <= 1'b1;
          cnt      <= cnt - 8'd1;
          if (cnt == 8'd1) begin
            if (last_seg) st <= chain ? C_CHAIN : C_STOP;
            else begin seg <= 1'b1; st <= C_START; end
          end
        end
        C_STOP: if (e_done) st <= C_DONE;
        C_DONE: begin done <= 1'b1; st <= C_IDLE; end
        C_CHAIN: begin                     // bus still held: next START is Sr
          done <= 1'b1;
          x    <= q_xfer;
          seg  <= 1'b0;
          st   <= C_START;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // Between the first START and the final STOP the engine holds the bus.
  a_stop_releases: assert property (@(posedge clk) disable iff (!rst_n)
    (st == C_DONE) |-> !e_held);

endmodule
