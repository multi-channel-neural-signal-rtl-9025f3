// ncr_pkg: constants and types shared by the neural-recording controller.
//
// The controller reads 2048 neural channels: 16 sensor units (SU), each with
// two 64-channel RHD2164 front-end chips on one SPI bus.  Every 16-bit SPI
// frame returns two 16-bit results per chip, "channel A" and "channel B".
// Upload words and the packet header layout follow the recording protocol:
// header = {16'hBBAA, sequence[7:0], group[3:0], channel[3:0]}, then 32 data
// words {B[15:0], A[15:0]}, and the 32-bit ending flag 32'hDDCCBBAA.
//
// The RHD2164 command codes (CONVERT, READ) and the two-frame result latency
// are those of the commercial chip and are not part of the protocol itself;
// they are kept here so that every module uses the same values.
package ncr_pkg;

  // ---- system sizes ----
  localparam int unsigned N_SU        = 16;   // sensor units / FPC interfaces
  localparam int unsigned N_CHIP      = 2;    // RHD2164 chips per sensor unit
  localparam int unsigned CH_PER_CHIP = 64;   // amplifier channels per chip
  localparam int unsigned WORDS_PER_PKT = CH_PER_CHIP / 2; // A+B per word = 32

  // ---- SPI / front-end ----
  localparam int unsigned SPI_BITS  = 16;     // 16-bit SPI words
  localparam int unsigned PIPE_LAT  = 2;      // a result returns 2 frames after its command
  localparam int unsigned FRAMES_PER_SAMPLE = WORDS_PER_PKT + PIPE_LAT; // 34

  localparam logic [15:0] CMD_DUMMY = 16'hFF00;  // READ register 63, flushes the pipeline

  function automatic logic [15:0] cmd_convert(input logic [5:0] ch);
    return {2'b00, ch, 8'h00};
  endfunction

  // ---- upload protocol ----
  localparam logic [15:0] MAGIC    = 16'hBBAA;
  localparam logic [31:0] END_FLAG = 32'hDDCCBBAA;

  typedef struct packed {
    logic [15:0] magic;
    logic [7:0]  seq;     // sample-period counter
    logic [3:0]  group;   // 0..3
    logic [3:0]  chan;    // 0..7
  } pkt_header_t;

  // ---- host instructions (32-bit words arriving over USB) ----
  typedef enum logic [3:0] {
    OP_NOP        = 4'h0,
    OP_START      = 4'h1,   // [23:0] number of sample periods, 0 = until STOP
    OP_STOP       = 4'h2,   // stop at the end of the current sample period
    OP_SPI        = 4'h3,   // forward [15:0] to every SU, chip mask in [17:16]
    OP_SET_PERIOD = 4'h4    // [15:0] sample period in system clocks
  } host_op_e;

endpackage
