// i2c_slave: the test-card device, an I2C slave with a word-addressed memory.
//
// It answers at one 7-bit address (ADDR7) and one 10-bit address (ADDR10),
// so one device covers both addressing modes. After its address with R/W = 0
// the first byte received is the word address; every further byte is stored
// at that address, which then increments (wrapping at MEM_DEPTH). After its
// address with R/W = 1 it sends the byte at the word address, increments, and
// keeps sending while the master acknowledges; a NACK ends the read. A
// 10-bit slave is selected by {11110,A9,A8,0} followed by A7..A0; after a
// repeated START the short form {11110,A9,A8,1} turns it into a transmitter.
// Every byte it receives is acknowledged; bytes for another address are
// ignored and left unacknowledged, which the master sees as a NACK.
// After the acknowledge bit of every byte it holds SCL low for STRETCH
// cycles (clock stretching; 0 disables it), as a real device does while it
// services the byte.
// Addressing, auto-increment and acknowledge rules follow the document; the
// memory size, the stretch time and the oversampled implementation are this
// design's choices.
//
// Implementation: SCL and SDA are oversampled on `clk` through a
// synchroniser and spike filter (i2c_input_filter), which suppresses pulses
// of up to SPIKE_CYCLES cycles. START/STOP are SDA edges while SCL is high; data is taken on
// SCL rising edges and SDA is changed just after SCL falling edges. The
// system clock must be at least about 8 times the SCL rate (30 times at
// 3.4 MHz with a 100 MHz clock).
module i2c_slave #(
  parameter logic [6:0]  ADDR7     = 7'h50,
  parameter logic [9:0]  ADDR10    = 10'h2A5,
  parameter int unsigned MEM_DEPTH = 256,
  parameter int unsigned STRETCH   = 100,
  parameter int unsigned SPIKE_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scl_in,
  input  logic sda_in,
  output logic scl_oe,
  output logic sda_oe,
  output logic start_seen,     // one-cycle pulse per START / repeated START
  output logic stop_seen       // one-cycle pulse per STOP
);

  localparam int unsigned AW = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1;

  typedef enum logic [2:0] {
    S_IDLE,      // not addressed, wait for START
    S_ADDR,      // receiving first address byte
    S_ADDR_LO,   // receiving second byte of a 10-bit address
    S_WADDR,     // receiving word address
    S_WDATA,     // receiving data
    S_RDATA      // transmitting data
  } sstate_e;

  logic [7:0] mem [MEM_DEPTH];
  logic [AW-1:0] ptr;

  logic       scl_f, sda_f;    // filtered bus levels
  logic       scl_q, sda_q;    // the same, one cycle earlier
  logic       scl_rise, scl_fall, start_c, stop_c;

  sstate_e    st;
  logic [3:0] bitn;          // SCL rising edges in this byte, 0..8
  logic [7:0] sh;
  logic       ack_now;       // drive ACK during the 9th clock
  logic       tx_byte;       // this byte is transmitted by us
  logic [7:0] tx;
  logic       ten_sel;       // selected by a full 10-bit write address
  logic       byte_end;      // 9th clock seen, its falling edge pending
  logic [15:0] hold;

  i2c_input_filter #(.SPIKE_CYCLES(SPIKE_CYCLES)) u_scl_filt (
    .clk, .rst_n, .d(scl_in), .q(scl_f));
  i2c_input_filter #(.SPIKE_CYCLES(SPIKE_CYCLES)) u_sda_filt (
    .clk, .rst_n, .d(sda_in), .q(sda_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q <= 1'b1;
      sda_q <= 1'b1;
    end else begin
      scl_q <= scl_f;
      sda_q <= sda_f;
    end
  end

  assign scl_rise = scl_f && !scl_q;
  assign scl_fall = !scl_f && scl_q;
  assign start_c  = scl_f && scl_q && sda_q && !sda_f;
  assign stop_c   = scl_f && scl_q && !sda_q && sda_f;

  assign start_seen = start_c;
  assign stop_seen  = stop_c;
  assign scl_oe     = (hold != 16'd0);

  // Byte just completed (valid on the 8th rising edge).
  logic [7:0] byte_in;
  assign byte_in = {sh[6:0], sda_f};

  always_ff @(posedge clk) begin
    if (st == S_WDATA && scl_rise && bitn == 4'd7 && !start_c && !stop_c)
      mem[ptr] <= byte_in;
  end

  logic is7, is10hi;
  assign is7    = (byte_in[7:1] == ADDR7);
  assign is10hi = (byte_in[7:3] == i2c_pkg::TEN_BIT_PREFIX) && (byte_in[2:1] == ADDR10[9:8]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      bitn     <= '0;
      sh       <= '0;
      ack_now  <= 1'b0;
      tx_byte  <= 1'b0;
      tx       <= '0;
      ten_sel  <= 1'b0;
      byte_end <= 1'b0;
      ptr      <= '0;
      sda_oe   <= 1'b0;
      hold     <= '0;
    end else begin
      if (hold != 16'd0) hold <= hold - 16'd1;

      if (stop_c) begin
        st       <= S_IDLE;
        ten_sel  <= 1'b0;
        sda_oe   <= 1'b0;
        tx_byte  <= 1'b0;
        ack_now  <= 1'b0;
        byte_end <= 1'b0;
      end else if (start_c) begin
        st       <= S_ADDR;
        bitn     <= '0;
        sda_oe   <= 1'b0;
        tx_byte  <= 1'b0;
        ack_now  <= 1'b0;
        byte_end <= 1'b0;
      end else if (st != S_IDLE) begin
        if (scl_rise) begin
          if (bitn < 4'd8) begin
            sh   <= byte_in;
            bitn <= bitn + 4'd1;
            if (bitn == 4'd7 && !tx_byte) begin
              // byte complete: decide whether to acknowledge it
              unique case (st)
                // a 10-bit read header is only accepted after a full match
                S_ADDR:    ack_now <= is10hi ? (!byte_in[0] || ten_sel) : is7;
                S_ADDR_LO: ack_now <= (byte_in == ADDR10[7:0]);
                S_WADDR:   ack_now <= 1'b1;
                S_WDATA:   ack_now <= 1'b1;
                default:   ack_now <= 1'b0;
              endcase
            end
          end else begin
            // 9th clock: the acknowledge bit
            bitn     <= '0;
            byte_end <= 1'b1;
            if (tx_byte) begin
              if (sda_f) st <= S_IDLE;      // master NACK: stop sending
            end else if (!ack_now) begin
              st <= S_IDLE;
            end else begin
              unique case (st)
                S_ADDR:
                  if (sh[7:3] == i2c_pkg::TEN_BIT_PREFIX) st <= sh[0] ? S_RDATA : S_ADDR_LO;
                  else                       st <= sh[0] ? S_RDATA : S_WADDR;
                S_ADDR_LO: begin st <= S_WADDR; ten_sel <= 1'b1; end
                S_WADDR:   begin st <= S_WDATA; ptr <= AW'(sh); end
                S_WDATA:   ptr <= ptr + AW'(1);
                default:   ;
              endcase
            end
          end
        end

        if (scl_fall) begin
          if (bitn == 4'd8) begin
            // start of the acknowledge clock
            sda_oe <= tx_byte ? 1'b0 : ack_now;   // release for master's answer
          end else if (byte_end) begin
            // end of the acknowledge clock: stretch, then next byte
            byte_end <= 1'b0;
            ack_now  <= 1'b0;
            hold     <= 16'(STRETCH);
            if (st == S_RDATA) begin
              tx_byte <= 1'b1;
              tx      <= {mem[ptr][6:0], 1'b0};
              sda_oe  <= !mem[ptr][7];
              ptr     <= ptr + AW'(1);
            end else begin
              tx_byte <= 1'b0;
              sda_oe  <= 1'b0;
            end
          end else if (tx_byte) begin
            sda_oe <= !tx[7];
            tx     <= {tx[6:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
