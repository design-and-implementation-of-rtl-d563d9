// i2c_xfer_checker: testbench-only scoreboard for one I2C channel.
//
// It sees each transfer request as the controller accepts it, works out the
// bus traffic that transfer must produce (START, repeated START, STOP, every
// 9-bit frame with its ACK or NACK) from the request alone and a shadow copy
// of the slave's memory, and compares it with the frames a bus monitor
// decodes from SCL and SDA. Bytes read from locations never written are only
// checked for their ACK bit. A transfer is checked when the next one starts
// or when `flush` is pulsed. It follows the slave's word pointer so that it
// can also predict reads that send no word address. It also counts the features that were exercised
// so that a testbench can demand that each one happened.
module i2c_xfer_checker
  import i2c_pkg::*;
#(
  parameter logic [6:0] ADDR7  = 7'h50,
  parameter logic [9:0] ADDR10 = 10'h2A5
) (
  input  logic  clk,
  input  logic  accept,      // request taken by the controller this cycle
  input  xfer_t req,
  input  logic  flush,
  input  logic  scl,
  input  logic  sda,
  output int    checks,
  output int    failures,
  output int    n_msg   [4],
  output int    n_amode [2],
  output int    n_pat   [3],
  output int    n_speed [3],
  output int    n_nack,
  output int    n_restart,
  output int    n_direct
);
  logic ev_valid, ev_ack; logic [1:0] ev_kind; logic [7:0] ev_byte; int partial;
  i2c_bus_monitor mon (.clk, .scl, .sda, .ev_valid, .ev_kind, .ev_byte, .ev_ack,
                       .partial_frames(partial));

  typedef logic [11:0] ev_t;    // {dont_care_byte, kind, byte, ack}
  ev_t got[$], exp[$];
  logic [7:0] shadow [256];
  bit         known  [256];
  logic [7:0] ptr = 8'd0;       // the slave's word pointer

  initial begin
    checks = 0; failures = 0; n_nack = 0; n_restart = 0; n_direct = 0;
    foreach (n_msg[i]) n_msg[i] = 0;
    foreach (n_amode[i]) n_amode[i] = 0;
    foreach (n_pat[i]) n_pat[i] = 0;
    foreach (n_speed[i]) n_speed[i] = 0;
    foreach (known[i]) known[i] = 0;
  end

  function automatic ev_t F(logic [7:0] b, bit a); return {1'b0, 2'd2, b, a}; endfunction

  function automatic void build(xfer_t x);
    int  n = (x.nbytes == 0) ? 1 : x.nbytes;
    bit  present = (x.amode == ADDR_10BIT) ? (x.saddr == ADDR10) : (x.saddr[6:0] == ADDR7);
    bit  segs_read[$];
    case (x.msg)
      MSG_WRITE:      segs_read = '{0};
      MSG_READ:       segs_read = '{1};
      MSG_WRITE_READ: segs_read = '{0, 1};
      default:        segs_read = '{1, 0};
    endcase
    exp.delete();
    if (x.msg == MSG_READ && x.direct) begin
      // read from the current word pointer, no word address
      exp.push_back({1'b0, 2'd0, 8'h00, 1'b0});
      if (x.amode == ADDR_10BIT) begin
        exp.push_back(F({5'b11110, x.saddr[9:8], 1'b0}, x.saddr[9:8] == ADDR10[9:8]));
        if (x.saddr[9:8] == ADDR10[9:8]) exp.push_back(F(x.saddr[7:0], present));
        if (present) begin
          exp.push_back({1'b0, 2'd0, 8'h00, 1'b0});
          exp.push_back(F({5'b11110, x.saddr[9:8], 1'b1}, 1'b1));
        end
      end else begin
        exp.push_back(F({x.saddr[6:0], 1'b1}, present));
      end
      if (present) begin
        for (int k = 0; k < n; k++)
          exp.push_back({!known[8'(ptr + k)], 2'd2, shadow[8'(ptr + k)], k != n - 1});
        ptr = 8'(ptr + n);
      end
      exp.push_back({1'b0, 2'd1, 8'h00, 1'b0});
      return;
    end
    foreach (segs_read[s]) begin
      exp.push_back({1'b0, 2'd0, 8'h00, 1'b0});
      if (x.amode == ADDR_10BIT) begin
        exp.push_back(F({5'b11110, x.saddr[9:8], 1'b0}, x.saddr[9:8] == ADDR10[9:8]));
        if (x.saddr[9:8] == ADDR10[9:8]) exp.push_back(F(x.saddr[7:0], present));
      end else begin
        exp.push_back(F({x.saddr[6:0], 1'b0}, present));
      end
      if (!present) break;
      exp.push_back(F(x.waddr, 1'b1));
      ptr = 8'(x.waddr + n);
      if (!segs_read[s]) begin
        for (int k = 0; k < n; k++) begin
          logic [7:0] v;
          v = pattern_value(x.pattern, x.pstart + k);
          exp.push_back(F(v, 1'b1));
          shadow[8'(x.waddr + k)] = v; known[8'(x.waddr + k)] = 1;
        end
      end else begin
        exp.push_back({1'b0, 2'd0, 8'h00, 1'b0});
        if (x.amode == ADDR_10BIT) exp.push_back(F({5'b11110, x.saddr[9:8], 1'b1}, 1'b1));
        else                       exp.push_back(F({x.saddr[6:0], 1'b1}, 1'b1));
        for (int k = 0; k < n; k++)
          exp.push_back({!known[8'(x.waddr + k)], 2'd2, shadow[8'(x.waddr + k)], k != n - 1});
      end
    end
    exp.push_back({1'b0, 2'd1, 8'h00, 1'b0});
  endfunction

  function automatic void compare();
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %m: %0d bus events, expected %0d", got.size(), exp.size());
    end
    for (int i = 0; i < got.size() && i < exp.size(); i++) begin
      bit ok = exp[i][11] ? (got[i][10:9] == exp[i][10:9] && got[i][0] == exp[i][0])
                          : (got[i][10:0] == exp[i][10:0]);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL %m: event %0d got %h expected %h", i, got[i][10:0], exp[i][10:0]);
      end
    end
    checks++;
    if (partial != 0) begin failures++; $display("FAIL %m: frame cut short"); end
  endfunction

  bit pending = 0;
  always @(posedge clk) begin
    if (ev_valid) begin
      got.push_back({1'b0, ev_kind, ev_byte, ev_ack});
      if (ev_kind == 2'd0 && got.size() > 1) n_restart++;
      if (ev_kind == 2'd2 && !ev_ack && got.size() >= 2 && got[got.size()-2][10:9] == 2'd0)
        n_nack++;               // address frame right after a START refused
    end
    if ((accept || flush) && pending) begin
      compare();
      pending = 0;
    end
    if (accept) begin
      got.delete();
      build(req);
      pending = 1;
      n_msg[req.msg]++;
      n_amode[req.amode]++;
      if (req.msg == MSG_READ && req.direct) n_direct++;
      if (req.pattern <= PAT_GRAY) n_pat[req.pattern]++;
      if (req.speed <= SPEED_HS)   n_speed[req.speed]++;
    end
  end
endmodule
