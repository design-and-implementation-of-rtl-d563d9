// i2c_pkg: types and constants shared by the I2C master, the test-card slave
// and the stress generator.
//
// A transfer is described by one packed struct, xfer_t, that carries every
// feature the controller can vary from one transfer to the next: message type
// (write, read, write-read, read-write), addressing mode (7 or 10 bit), slave
// address, word (start) address inside the slave or a direct read from the
// slave's current word pointer, number of data bytes, data
// pattern (increment, Fibonacci, Gray code) with its start index, and bus
// speed (100 kHz, 400 kHz, 3.4 MHz). The feature set follows the document; the
// field widths and encodings are this design's choice.
package i2c_pkg;

  // Bus speed grades (standard, fast, high speed).
  typedef enum logic [1:0] {
    SPEED_STD  = 2'd0,   // 100 kHz
    SPEED_FAST = 2'd1,   // 400 kHz
    SPEED_HS   = 2'd2    // 3.4 MHz, SCL high:low = 1:2
  } speed_e;

  // Data patterns for transmitted bytes.
  typedef enum logic [1:0] {
    PAT_INCR = 2'd0,     // 0,1,2,3,...
    PAT_FIB  = 2'd1,     // Fibonacci numbers, kept to 8 bits (mod 256)
    PAT_GRAY = 2'd2      // Gray code of an incrementing counter
  } pattern_e;

  // Message types. Combined messages join two segments with a repeated START.
  typedef enum logic [1:0] {
    MSG_WRITE      = 2'd0,
    MSG_READ       = 2'd1,
    MSG_WRITE_READ = 2'd2,
    MSG_READ_WRITE = 2'd3
  } msg_e;

  typedef enum logic {
    ADDR_7BIT  = 1'b0,
    ADDR_10BIT = 1'b1
  } addr_mode_e;

  // Commands understood by the master byte engine.
  typedef enum logic [2:0] {
    CMD_START = 3'd0,    // START, or repeated START when the bus is already held
    CMD_WRITE = 3'd1,    // send one byte, sample the receiver's ACK
    CMD_READ  = 3'd2,    // receive one byte, then send ACK or NACK
    CMD_STOP  = 3'd3
  } cmd_e;

  // Upper five bits of the first byte of a 10-bit address (1111 0xx).
  localparam logic [4:0] TEN_BIT_PREFIX = 5'b11110;

  typedef struct packed {
    msg_e       msg;
    addr_mode_e amode;
    logic [9:0] saddr;    // slave address; bits [6:0] used in 7-bit mode
    logic [7:0] waddr;    // word (start) address inside the slave
    logic       direct;   // MSG_READ only: read from the slave's current
                          // word pointer, without sending a word address
    logic [7:0] nbytes;   // data bytes per segment, 1..255 (0 is treated as 1)
    pattern_e   pattern;
    logic [7:0] pstart;   // index of the first pattern element
    speed_e     speed;
  } xfer_t;

  // Element n of a pattern, 8 bits wide. Used by the testbenches as a
  // reference; the hardware generator steps through the sequence instead.
  function automatic logic [7:0] pattern_value(pattern_e p, int unsigned n);
    logic [7:0] a, b, t;
    case (p)
      PAT_INCR: return 8'(n);
      PAT_GRAY: return 8'(n) ^ (8'(n) >> 1);
      default: begin
        a = 8'd0; b = 8'd1;
        for (int unsigned i = 0; i < n; i++) begin
          t = a + b; a = b; b = t;
        end
        return a;
      end
    endcase
  endfunction

endpackage
