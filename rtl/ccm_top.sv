// ccm_top: FPGA logic of the central controller of a 2048-channel neural
// recording system.
//
// Sixteen sensor units, each with two 64-channel RHD2164 front-end chips, hang
// on sixteen SPI buses (one per flexible-cable interface).  The controller
// samples every channel at 30 kS/s with 16-bit resolution, frames the results
// into packets and streams them to the host over a USB bridge, and carries out
// the host's instructions.
//
//   host words --> cmd_manager --+--> spi_master x N_SU --> SPI pins
//                       |        |          | results {B,A} per chip
//                 clock_manager  +--> sample_buffer (2 banks)
//                                          |
//                              packet_formatter --> data_fifo --> upload stream
//
// All SPI masters receive the same command in the same cycle and therefore run
// in lock step; the command manager follows the handshake of unit 0.  One
// sample period is 34 SPI frames (32 conversions + 2 frames to drain the
// two-deep result pipeline), 34*82 = 2788 cycles of the 3200-cycle period at
// the default 96 MHz clock.  Uploading one period takes 32 packets * 33 words
// = 1056 words.
// Interfaces: host instructions and upload words are 32-bit valid/ready
// streams meant to connect to the FPGA side of a USB bridge; the SPI pins go to
// the sensor units.  Status outputs report the state of the acquisition.
// Module structure follows the paper's split of the FPGA into SPI master,
// command manager, clock manager and data storage; the sample buffer and
// packet formatter are this design's realisation of its buffering and upload
// protocol.
module ccm_top
  import ncr_pkg::*;
#(
  parameter int unsigned SYS_CLK_HZ = 96_000_000,
  parameter int unsigned SCLK_HZ    = 24_000_000,
  parameter int unsigned SAMPLE_HZ  = 30_000,
  parameter int unsigned FIFO_DEPTH = 4096,
  localparam int unsigned NSU       = N_SU,
  localparam int unsigned NCS       = N_CHIP
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host instructions (from the USB bridge)
  input  logic                         h_valid,
  output logic                         h_ready,
  input  logic [31:0]                  h_data,
  // upload stream (to the USB bridge)
  output logic                         up_valid,
  input  logic                         up_ready,
  output logic [31:0]                  up_data,
  // SPI buses, one per sensor unit
  output logic [NSU-1:0]               spi_sclk,
  output logic [NSU-1:0]               spi_mosi,
  output logic [NSU-1:0][NCS-1:0]      spi_cs_n,
  input  logic [NSU-1:0][NCS-1:0]      spi_miso,
  // status
  output logic                         running,
  output logic [15:0]                  overrun_cnt,
  output logic [15:0]                  tick_miss_cnt,
  output logic [15:0]                  fwd_cnt,
  output logic [$clog2(FIFO_DEPTH):0]  fifo_level
);

  localparam logic [15:0] DEF_PERIOD = 16'(SYS_CLK_HZ / SAMPLE_HZ);

  // ---------------- clock manager ----------------
  logic [15:0] period;
  logic        tick_restart, spi_ce, sample_tick;

  clock_manager #(.SYS_CLK_HZ(SYS_CLK_HZ), .SCLK_HZ(SCLK_HZ)) u_clk (
    .clk, .rst_n, .period, .restart(tick_restart), .spi_ce, .sample_tick
  );

  // ---------------- command manager ----------------
  logic            spi_start;
  logic [15:0]     spi_cmd;
  logic [NCS-1:0]  spi_mask;
  logic            buf_we, buf_bank;
  logic [4:0]      buf_addr;
  logic            frame_valid, frame_bank, pk_busy, end_req, end_ack;
  logic [7:0]      frame_seq;
  logic [NSU-1:0]  su_done, su_busy;

  cmd_manager #(.NCS(NCS), .DEF_PERIOD(DEF_PERIOD)) u_cmd (
    .clk, .rst_n,
    .h_valid, .h_ready, .h_data,
    .period, .tick_restart, .sample_tick,
    .spi_start, .spi_cmd, .spi_mask, .spi_done(su_done[0]),
    .buf_we, .buf_bank, .buf_addr,
    .frame_valid, .frame_bank, .frame_seq, .pk_busy, .end_req, .end_ack,
    .running, .overrun_cnt, .tick_miss_cnt, .fwd_cnt
  );

  // ---------------- SPI masters ----------------
  logic [NSU-1:0][NCS-1:0][15:0] rx_a, rx_b;
  logic [NSU-1:0][NCS-1:0][31:0] wdata;

  for (genvar s = 0; s < NSU; s++) begin : g_su
    spi_master #(.N_CS(NCS)) u_spi (
      .clk, .rst_n, .spi_ce,
      .start(spi_start), .cmd(spi_cmd), .cs_mask(spi_mask),
      .busy(su_busy[s]), .done(su_done[s]),
      .rx_a(rx_a[s]), .rx_b(rx_b[s]),
      .sclk(spi_sclk[s]), .mosi(spi_mosi[s]), .cs_n(spi_cs_n[s]), .miso(spi_miso[s])
    );
    for (genvar c = 0; c < NCS; c++) begin : g_chip
      assign wdata[s][c] = {rx_b[s][c], rx_a[s][c]};
    end
  end

  // ---------------- sample buffer ----------------
  logic                      rd_bank;
  logic [$clog2(NSU)-1:0]    rd_su;
  logic [$clog2(NCS)-1:0]    rd_chip;
  logic [4:0]                rd_addr;
  logic [31:0]               rd_data;

  sample_buffer #(.NSU(NSU), .NCS(NCS)) u_buf (
    .clk, .we(buf_we), .wr_bank(buf_bank), .wr_addr(buf_addr), .wdata,
    .rd_bank, .rd_su, .rd_chip, .rd_addr, .rdata(rd_data)
  );

  // ---------------- packet formatter ----------------
  logic        pk_valid, pk_ready;
  logic [31:0] pk_data;

  packet_formatter #(.NSU(NSU), .NCS(NCS)) u_pkt (
    .clk, .rst_n,
    .frame_valid, .frame_bank, .frame_seq, .busy(pk_busy), .end_req, .end_ack,
    .rd_bank, .rd_su, .rd_chip, .rd_addr, .rd_data,
    .out_valid(pk_valid), .out_ready(pk_ready), .out_data(pk_data)
  );

  // ---------------- data storage ----------------
  data_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(pk_valid), .in_ready(pk_ready), .in_data(pk_data),
    .out_valid(up_valid), .out_ready(up_ready), .out_data(up_data),
    .level(fifo_level)
  );

  // every sensor unit must follow unit 0 exactly
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
                                (su_done == '0 || su_done == '1) && (su_busy == '0 || su_busy == '1));

endmodule
