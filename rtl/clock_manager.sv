// clock_manager: timing enables for the acquisition logic.
//
// The whole controller runs on one system clock (SYS_CLK_HZ).  This block
// derives the two rates the system needs from it:
//   * spi_ce      - one-cycle pulse every SYS_CLK_HZ/(2*SCLK_HZ) cycles; the SPI
//                   masters toggle SCLK on it, so SCLK runs at SCLK_HZ (24 MHz).
//   * sample_tick - one-cycle pulse every `period` cycles; it starts one
//                   sample period (all 64 channels of every chip converted once).
//                   The controller's reset value of `period` is
//                   SYS_CLK_HZ/30 kHz, i.e. 30 kS/s per channel.
// `period` is programmable from the host (the sampling-rate setting); a new
// value takes effect at the next tick.  `restart` realigns the sample timer so
// that the first tick comes one full period after an acquisition starts.
// The FPGA clock primitive that would make SYS_CLK_HZ from the board
// oscillator is vendor IP and is not modelled; this block only divides.
module clock_manager #(
  parameter int unsigned SYS_CLK_HZ = 96_000_000,
  parameter int unsigned SCLK_HZ    = 24_000_000,
  localparam int unsigned HALF_DIV  = SYS_CLK_HZ / (2 * SCLK_HZ)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] period,      // sample period in clocks (>= 2)
  input  logic        restart,
  output logic        spi_ce,
  output logic        sample_tick
);

  initial assert (HALF_DIV >= 1) else $error("SYS_CLK_HZ must be >= 2*SCLK_HZ");

  localparam int unsigned HW = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;

  logic [HW-1:0] half_cnt;
  logic [15:0]   samp_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_cnt <= '0;
      spi_ce   <= 1'b0;
    end else if (half_cnt == HW'(HALF_DIV - 1)) begin
      half_cnt <= '0;
      spi_ce   <= 1'b1;
    end else begin
      half_cnt <= half_cnt + 1'b1;
      spi_ce   <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_cnt    <= '0;
      sample_tick <= 1'b0;
    end else if (restart) begin
      samp_cnt    <= '0;
      sample_tick <= 1'b0;
    end else if (samp_cnt >= period - 16'd1) begin
      samp_cnt    <= '0;
      sample_tick <= 1'b1;
    end else begin
      samp_cnt    <= samp_cnt + 16'd1;
      sample_tick <= 1'b0;
    end
  end

endmodule
