// sample_buffer: double-banked store for one sample period of every chip.
//
// All sensor units are read in lock step, so after each SPI frame every chip
// delivers one 32-bit word {B, A} at the same time.  The buffer takes all
// N_SU*N_CHIP words in one write (one small memory per sensor unit) at word
// address `wr_addr` of bank `wr_bank`.  The packet formatter reads the other
// bank, one chip word at a time, while the next sample period is written, so
// the two sides never touch the same bank.
// Read is asynchronous (distributed RAM); write is synchronous.  Memory
// contents are not reset: a word is always written before it is read.
// Double banking is this design's choice; the paper only states that sampled
// results are buffered before upload.
module sample_buffer
  import ncr_pkg::*;
#(
  parameter int unsigned NSU   = N_SU,
  parameter int unsigned NCS   = N_CHIP,
  parameter int unsigned WORDS = WORDS_PER_PKT,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned SW   = (NSU > 1) ? $clog2(NSU) : 1,
  localparam int unsigned CW   = (NCS > 1) ? $clog2(NCS) : 1
) (
  input  logic                             clk,
  input  logic                             we,
  input  logic                             wr_bank,
  input  logic [AW-1:0]                    wr_addr,
  input  logic [NSU-1:0][NCS-1:0][31:0]    wdata,
  input  logic                             rd_bank,
  input  logic [SW-1:0]                    rd_su,
  input  logic [CW-1:0]                    rd_chip,
  input  logic [AW-1:0]                    rd_addr,
  output logic [31:0]                      rdata
);

  logic [NCS-1:0][31:0] mem [NSU][2][WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int s = 0; s < NSU; s++) mem[s][wr_bank][wr_addr] <= wdata[s];
    end
  end

  logic [NCS-1:0][31:0] rd_row;
  assign rd_row = mem[rd_su][rd_bank][rd_addr];
  assign rdata  = rd_row[rd_chip];

endmodule
