// cmd_manager: host instruction parser and acquisition sequencer.
//
// Host instructions arrive as 32-bit words (valid/ready), op code in [31:28]:
//   START      [23:0] = number of sample periods to record, 0 = until STOP
//   STOP       finish after the sample period in progress
//   SPI        forward the 16-bit command [15:0] to the chips in mask [17:16]
//              of every sensor unit (register writes, calibration, ...);
//              accepted only while no acquisition runs
//   SET_PERIOD [15:0] = sample period in system clocks (sampling-rate setting)
// Bits [27:24] are reserved and ignored.
// While an acquisition runs, every sample_tick starts one sample period: the
// sequencer sends CONVERT(0)..CONVERT(31) and two dummy commands to all sensor
// units in lock step.  A result returns PIPE_LAT (2) frames after its
// command, so the results of frame j (j >= 2) are written to buffer word j-2;
// word w then holds channel w as A and channel w+32 as B of each chip.
// At the end of the period the filled bank is handed to the packet formatter
// with the 8-bit sequence number, and the next period uses the other bank.  If
// the formatter is still busy with the previous period, the new one is dropped
// and `overrun_cnt` counts it; its sequence number is skipped, so the gap is
// visible in the upload.  A tick that arrives while the previous period is
// still being converted (period set too short) is skipped and counted in
// `tick_miss_cnt`.  When the requested number of periods is done, or after a
// STOP, `end_req` asks the formatter for the ending flag.
// The instruction encoding, the stop/overrun policies and the counters are this
// design's choices; the paper names the tasks (parse, forward, execute).
module cmd_manager
  import ncr_pkg::*;
#(
  parameter int unsigned NCS        = N_CHIP,
  parameter logic [15:0] DEF_PERIOD = 16'd3200   // 96 MHz / 30 kS/s
) (
  input  logic               clk,
  input  logic               rst_n,
  // host instructions
  input  logic               h_valid,
  output logic               h_ready,
  input  logic [31:0]        h_data,
  // clock manager
  output logic [15:0]        period,
  output logic               tick_restart,
  input  logic               sample_tick,
  // SPI masters (all sensor units in lock step)
  output logic               spi_start,
  output logic [15:0]        spi_cmd,
  output logic [NCS-1:0]     spi_mask,
  input  logic               spi_done,
  // sample buffer write side
  output logic               buf_we,
  output logic               buf_bank,
  output logic [4:0]         buf_addr,
  // packet formatter
  output logic               frame_valid,
  output logic               frame_bank,
  output logic [7:0]         frame_seq,
  input  logic               pk_busy,
  output logic               end_req,
  input  logic               end_ack,
  // status
  output logic               running,
  output logic [15:0]        overrun_cnt,
  output logic [15:0]        tick_miss_cnt,
  output logic [15:0]        fwd_cnt
);

  typedef enum logic [1:0] {SQ_IDLE, SQ_ISSUE, SQ_WAIT, SQ_FWD} sq_state_e;

  sq_state_e       sq;
  logic [5:0]      frame_idx;
  logic [23:0]     frames_left;
  logic            continuous;
  logic            stop_req;
  logic            fwd_pending;
  logic [15:0]     fwd_cmd;
  logic [NCS-1:0]  fwd_mask;
  logic [7:0]      seq_cnt;
  logic            wr_bank;

  host_op_e op;
  assign op = host_op_e'(h_data[31:28]);

  always_comb begin
    unique case (op)
      OP_SPI:   h_ready = !running && !fwd_pending && (sq == SQ_IDLE);
      OP_START: h_ready = !end_req;
      default:  h_ready = 1'b1;
    endcase
  end

  logic h_fire;
  assign h_fire = h_valid && h_ready;

  logic period_end;
  assign period_end = (sq == SQ_WAIT) && spi_done && (frame_idx == 6'(FRAMES_PER_SAMPLE - 1));

  assign spi_start   = (sq == SQ_ISSUE) || (sq == SQ_IDLE && !running && fwd_pending);
  assign spi_cmd     = (sq == SQ_ISSUE) ? ((frame_idx < 6'(WORDS_PER_PKT)) ? cmd_convert(frame_idx)
                                                                          : CMD_DUMMY)
                                        : fwd_cmd;
  assign spi_mask    = (sq == SQ_ISSUE) ? '1 : fwd_mask;

  assign buf_we      = (sq == SQ_WAIT) && spi_done && (frame_idx >= 6'(PIPE_LAT));
  assign buf_addr    = 5'(frame_idx - 6'(PIPE_LAT));
  assign buf_bank    = wr_bank;

  assign frame_valid = period_end && !pk_busy;
  assign frame_bank  = wr_bank;
  assign frame_seq   = seq_cnt;
  assign tick_restart = h_fire && op == OP_START && !running;

  logic finishing;
  assign finishing = period_end && (stop_req || (!continuous && frames_left == 24'd1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq            <= SQ_IDLE;
      frame_idx     <= '0;
      frames_left   <= '0;
      continuous    <= 1'b0;
      stop_req      <= 1'b0;
      running       <= 1'b0;
      fwd_pending   <= 1'b0;
      fwd_cmd       <= '0;
      fwd_mask      <= '0;
      seq_cnt       <= '0;
      wr_bank       <= 1'b0;
      period        <= DEF_PERIOD;
      end_req       <= 1'b0;
      overrun_cnt   <= '0;
      tick_miss_cnt <= '0;
      fwd_cnt       <= '0;
    end else begin
      // ---- host instructions ----
      if (h_fire) begin
        unique case (op)
          OP_START: if (!running) begin
            running     <= 1'b1;
            frames_left <= h_data[23:0];
            continuous  <= (h_data[23:0] == 24'd0);
            stop_req    <= 1'b0;
            seq_cnt     <= '0;
          end
          OP_STOP:       if (running) stop_req <= 1'b1;
          OP_SPI: begin
            fwd_pending <= 1'b1;
            fwd_cmd     <= h_data[15:0];
            fwd_mask    <= h_data[16 +: NCS];
          end
          OP_SET_PERIOD: period <= (h_data[15:0] < 16'd2) ? 16'd2 : h_data[15:0];
          default: ;
        endcase
      end

      // ---- sequencer ----
      unique case (sq)
        SQ_IDLE: begin
          if (running && sample_tick) begin
            frame_idx <= '0;
            sq        <= SQ_ISSUE;
          end else if (!running && fwd_pending) begin
            sq <= SQ_FWD;             // spi_start is high this cycle
          end
        end
        SQ_ISSUE: sq <= SQ_WAIT;
        SQ_WAIT: if (spi_done) begin
          if (frame_idx == 6'(FRAMES_PER_SAMPLE - 1)) sq <= SQ_IDLE;
          else begin
            frame_idx <= frame_idx + 6'd1;
            sq        <= SQ_ISSUE;
          end
        end
        SQ_FWD: if (spi_done) begin
          fwd_pending <= 1'b0;
          fwd_cnt     <= fwd_cnt + 16'd1;
          sq          <= SQ_IDLE;
        end
        default: sq <= SQ_IDLE;
      endcase

      if (running && sample_tick && sq != SQ_IDLE) tick_miss_cnt <= tick_miss_cnt + 16'd1;

      // ---- end of a sample period ----
      if (period_end) begin
        seq_cnt <= seq_cnt + 8'd1;
        if (!pk_busy) wr_bank <= ~wr_bank;
        else          overrun_cnt <= overrun_cnt + 16'd1;
        if (!continuous) frames_left <= frames_left - 24'd1;
      end
      if (finishing) begin
        running  <= 1'b0;
        stop_req <= 1'b0;
        end_req  <= 1'b1;
      end else if (end_ack) begin
        end_req  <= 1'b0;
      end
    end
  end

  a_one_frame_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                          spi_start |-> (sq != SQ_WAIT));

endmodule
