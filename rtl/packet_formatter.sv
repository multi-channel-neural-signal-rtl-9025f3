// packet_formatter: turns one buffered sample period into upload packets.
//
// For every chip k = 0..NPKT-1 (sensor unit k/2, chip k%2) it emits one packet
// of 33 words:
//   header  {16'hBBAA, seq[7:0], group[3:0], channel[3:0]}
//   32 data words {channel B result, channel A result}, word w carrying
//   channels w (A, low half) and w+32 (B, high half) of that chip.
// The 32 chips are numbered by group = k mod 4 and channel = k div 4, so the
// headers of one sample period read BBAAss00, BBAAss10, BBAAss20, BBAAss30,
// BBAAss01, ... .  When `end_req` is high and no period is being sent, the
// single ending flag 32'hDDCCBBAA is emitted and `end_ack` pulses.
// Output is a valid/ready stream, one word per cycle when `out_ready` stays
// high, so one sample period takes 32*33 = 1056 cycles.  Buffer reads are
// asynchronous, so the data word is presented in the same cycle as its address.
// `frame_valid` is accepted only while `busy` is low.
// The header fields and flags follow the recording protocol; the mapping of
// chips to group/channel numbers is this design's reading of it.
module packet_formatter
  import ncr_pkg::*;
#(
  parameter int unsigned NSU  = N_SU,
  parameter int unsigned NCS  = N_CHIP,
  localparam int unsigned NPKT = NSU * NCS,
  localparam int unsigned PW   = (NPKT > 1) ? $clog2(NPKT) : 1,
  localparam int unsigned SW   = (NSU > 1) ? $clog2(NSU) : 1,
  localparam int unsigned CW   = (NCS > 1) ? $clog2(NCS) : 1,
  localparam int unsigned AW   = $clog2(WORDS_PER_PKT)
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the command manager
  input  logic           frame_valid,
  input  logic           frame_bank,
  input  logic [7:0]     frame_seq,
  output logic           busy,
  input  logic           end_req,
  output logic           end_ack,
  // sample buffer read side
  output logic           rd_bank,
  output logic [SW-1:0]  rd_su,
  output logic [CW-1:0]  rd_chip,
  output logic [AW-1:0]  rd_addr,
  input  logic [31:0]    rd_data,
  // upload stream
  output logic           out_valid,
  input  logic           out_ready,
  output logic [31:0]    out_data
);

  initial assert (NPKT <= 32) else $error("header numbers at most 32 chips");

  typedef enum logic [1:0] {PK_IDLE, PK_HDR, PK_DATA, PK_END} pk_state_e;

  pk_state_e     st;
  logic [PW-1:0] pkt;
  logic [AW-1:0] word;
  logic [7:0]    seq_q;
  logic          bank_q;

  logic [4:0]  pkt5;
  pkt_header_t hdr;
  assign pkt5 = 5'(pkt);
  always_comb begin
    hdr.magic = MAGIC;
    hdr.seq   = seq_q;
    hdr.group = {2'b00, pkt5[1:0]};
    hdr.chan  = {1'b0, pkt5[4:2]};
  end

  assign busy      = (st != PK_IDLE);
  assign rd_bank   = bank_q;
  assign rd_su     = SW'(pkt / PW'(NCS));
  assign rd_chip   = CW'(pkt % PW'(NCS));
  assign rd_addr   = word;
  assign out_valid = (st != PK_IDLE);
  assign out_data  = (st == PK_HDR)  ? hdr :
                     (st == PK_DATA) ? rd_data : END_FLAG;
  assign end_ack   = (st == PK_END) && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= PK_IDLE;
      pkt    <= '0;
      word   <= '0;
      seq_q  <= '0;
      bank_q <= 1'b0;
    end else begin
      unique case (st)
        PK_IDLE: begin
          if (frame_valid) begin
            seq_q  <= frame_seq;
            bank_q <= frame_bank;
            pkt    <= '0;
            st     <= PK_HDR;
          end else if (end_req) begin
            st <= PK_END;
          end
        end
        PK_HDR: if (out_ready) begin
          word <= '0;
          st   <= PK_DATA;
        end
        PK_DATA: if (out_ready) begin
          if (word == AW'(WORDS_PER_PKT - 1)) begin
            if (pkt == PW'(NPKT - 1)) st <= PK_IDLE;
            else begin
              pkt <= pkt + 1'b1;
              st  <= PK_HDR;
            end
          end else begin
            word <= word + 1'b1;
          end
        end
        PK_END: if (out_ready) st <= PK_IDLE;
        default: st <= PK_IDLE;
      endcase
    end
  end

  // a valid word may not change or vanish before it is taken
  a_stream_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
