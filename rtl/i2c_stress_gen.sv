// i2c_stress_gen: randomised stress test for one I2C controller.
//
// It feeds its controller an endless (or counted) series of transfers in
// which every feature is drawn at random: message type, 7- or 10-bit
// addressing, slave address, word address, byte count, data pattern and its
// start index, bus speed, and for reads whether a word address is sent. The idea of stressing the controller by
// randomising all its features over a long run and counting data loss is the
// document's; the hardware form is this design's own.
//
// Randomness comes from a 32-bit Galois LFSR (polynomial x^32+x^22+x^2+x+1)
// that steps every clock cycle, so successive transfers, which take a varying
// number of cycles, draw unrelated values. One draw in eight aims at a slave
// address with no device behind it (ABSENT_ADDR7 / ABSENT_ADDR10), which the
// bus answers with NACK: these are counted as lost packets. Write-read
// messages read back the bytes they have just written; each byte read back is
// compared with a second pattern generator and every difference counts as a
// mismatch.
//
// Interface: while `enable` is high it issues transfers until `n_xfers` have
// completed (0 = no limit); `finished` is then high. The counters are
// cleared by reset only.
module i2c_stress_gen
  import i2c_pkg::*;
#(
  parameter logic [31:0] SEED          = 32'h1D2C_3B4A,
  parameter logic [6:0]  SLV_ADDR7     = 7'h50,
  parameter logic [9:0]  SLV_ADDR10    = 10'h2A5,
  parameter logic [6:0]  ABSENT_ADDR7  = 7'h3C,
  parameter logic [9:0]  ABSENT_ADDR10 = 10'h15A,
  parameter int unsigned MAX_NBYTES    = 16    // 1..16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] n_xfers,
  // to the controller
  output logic        req_valid,
  output xfer_t       req,
  input  logic        req_ready,
  input  logic        done,
  input  logic        nack,
  input  logic        rd_valid,
  input  logic [7:0]  rd_data,
  input  logic        wr_valid,
  // statistics
  output logic [31:0] xfer_count,
  output logic [31:0] nack_count,
  output logic [31:0] mismatch_count,
  output logic [31:0] byte_count,
  output logic        finished
);

  logic [31:0] lfsr;
  logic        in_flight;
  logic        check_rd;     // current transfer reads back what it wrote
  logic        rd_phase;     // write segment done, reads now belong to the check

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == 32'd0) ? 32'h1 : SEED;
    else        lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
  end

  assign finished = (n_xfers != 32'd0) && (xfer_count >= n_xfers);

  // Draw a transfer from the current LFSR value.
  always_comb begin
    logic absent;
    absent     = (lfsr[5:3] == 3'd0);
    req        = '0;
    req.msg    = msg_e'(lfsr[1:0]);
    req.amode  = addr_mode_e'(lfsr[2]);
    if (lfsr[2]) req.saddr = absent ? ABSENT_ADDR10 : SLV_ADDR10;
    else         req.saddr = {3'b000, absent ? ABSENT_ADDR7 : SLV_ADDR7};
    req.waddr  = lfsr[13:6];
    req.direct = lfsr[12] ^ lfsr[25];
    req.nbytes = 8'(32'(lfsr[17:14]) % MAX_NBYTES + 1);
    case (lfsr[19:18])
      2'd0:    req.pattern = PAT_INCR;
      2'd1:    req.pattern = PAT_FIB;
      2'd2:    req.pattern = PAT_GRAY;
      default: req.pattern = pattern_e'(lfsr[21:20] % 2'd3);
    endcase
    req.pstart = lfsr[29:22];
    case (lfsr[31:30])
      2'd0:    req.speed = SPEED_STD;
      2'd1:    req.speed = SPEED_FAST;
      default: req.speed = SPEED_HS;
    endcase
  end

  assign req_valid = enable && !finished && !in_flight && req_ready;

  // Expected read-back data.
  logic       pg_ready;
  logic [7:0] pg_data;

  i2c_pattern_gen u_expect (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (req_valid),
    .pattern(req.pattern),
    .start  (req.pstart),
    .next   (check_rd && rd_phase && rd_valid),
    .ready  (pg_ready),
    .data   (pg_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flight      <= 1'b0;
      check_rd       <= 1'b0;
      rd_phase       <= 1'b0;
      xfer_count     <= '0;
      nack_count     <= '0;
      mismatch_count <= '0;
      byte_count     <= '0;
    end else begin
      if (req_valid) begin
        in_flight <= 1'b1;
        check_rd  <= (req.msg == MSG_WRITE_READ);
        rd_phase  <= 1'b0;
      end
      if (wr_valid) rd_phase <= 1'b1;
      if (rd_valid || wr_valid) byte_count <= byte_count + 32'd1;
      if (check_rd && rd_phase && rd_valid && pg_ready && rd_data != pg_data)
        mismatch_count <= mismatch_count + 32'd1;
      if (done) begin
        in_flight  <= 1'b0;
        xfer_count <= xfer_count + 32'd1;
        if (nack) nack_count <= nack_count + 32'd1;
      end
    end
  end

endmodule
