// spi_master: full-duplex 16-bit SPI master for one sensor unit.
//
// One sensor unit carries two RHD2164 front-end chips.  They share SCLK and
// MOSI; each has its own active-low chip select and its own MISO line.  A frame
// sends one 16-bit command, MSB first, to every chip whose bit is set in
// `cs_mask`, and at the same time reads two 16-bit results from each chip's
// MISO: channel A is sampled just before each rising SCLK edge and channel B
// just before each falling edge (double data rate), so a frame returns two
// channels per chip.  SCLK idles low; MOSI changes after the falling edge and is
// stable at the rising edge (mode 0).
//
// Timing, counted in spi_ce pulses (one pulse = half an SCLK period):
//   1 pulse CS low before the first rising edge, 32 pulses for 16 SCLK periods,
//   1 pulse to raise CS, CS_GAP pulses with CS high before `done`.
// With the default 96 MHz system clock and spi_ce every 2 cycles (24 MHz SCLK)
// a frame takes 2*(34+CS_GAP) = 82 cycles; CS stays high for at least
// (CS_GAP+1) half periods between frames.
// `start` is taken only while `busy` is low; `rx_a`/`rx_b` are valid from the
// cycle of the one-cycle `done` pulse until the next frame begins.
// The 16-bit word and the four-wire bus follow the front-end chip; CS_GAP, the
// DDR read of A/B and the handshake are choices of this design.
module spi_master
  import ncr_pkg::*;
#(
  parameter int unsigned N_CS   = N_CHIP,
  parameter int unsigned CS_GAP = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   spi_ce,
  // command side
  input  logic                   start,
  input  logic [15:0]            cmd,
  input  logic [N_CS-1:0]        cs_mask,
  output logic                   busy,
  output logic                   done,
  output logic [N_CS-1:0][15:0]  rx_a,
  output logic [N_CS-1:0][15:0]  rx_b,
  // SPI pins
  output logic                   sclk,
  output logic                   mosi,
  output logic [N_CS-1:0]        cs_n,
  input  logic [N_CS-1:0]        miso
);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_SHIFT, S_TRAIL, S_GAP} state_e;

  localparam int unsigned GW = (CS_GAP > 1) ? $clog2(CS_GAP + 1) : 1;

  state_e          state;
  logic [15:0]     tx_sh;
  logic [N_CS-1:0] mask_q;
  logic [3:0]      bit_cnt;
  logic [GW-1:0]   gap_cnt;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tx_sh   <= '0;
      mask_q  <= '0;
      bit_cnt <= '0;
      gap_cnt <= '0;
      sclk    <= 1'b0;
      mosi    <= 1'b0;
      cs_n    <= '1;
      done    <= 1'b0;
      rx_a    <= '0;
      rx_b    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            tx_sh  <= cmd;
            mask_q <= cs_mask;
            state  <= S_LEAD;
          end
        end
        S_LEAD: if (spi_ce) begin
          cs_n    <= ~mask_q;
          mosi    <= tx_sh[15];
          bit_cnt <= '0;
          state   <= S_SHIFT;
        end
        S_SHIFT: if (spi_ce) begin
          if (!sclk) begin
            // rising edge: the slave takes MOSI, channel A bit is read
            sclk <= 1'b1;
            for (int c = 0; c < N_CS; c++) rx_a[c] <= {rx_a[c][14:0], miso[c]};
          end else begin
            // falling edge: channel B bit is read, MOSI moves on
            sclk <= 1'b0;
            for (int c = 0; c < N_CS; c++) rx_b[c] <= {rx_b[c][14:0], miso[c]};
            tx_sh   <= {tx_sh[14:0], 1'b0};
            mosi    <= tx_sh[14];
            bit_cnt <= bit_cnt + 4'd1;
            if (bit_cnt == 4'(SPI_BITS - 1)) state <= S_TRAIL;
          end
        end
        S_TRAIL: if (spi_ce) begin
          cs_n    <= '1;
          mosi    <= 1'b0;
          gap_cnt <= '0;
          state   <= S_GAP;
        end
        S_GAP: if (spi_ce) begin
          if (gap_cnt == GW'(CS_GAP - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            gap_cnt <= gap_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SCLK must be low whenever chip select changes
  a_sclk_low_on_cs: assert property (@(posedge clk) disable iff (!rst_n)
                                     (cs_n != $past(cs_n)) |-> !sclk);

endmodule
