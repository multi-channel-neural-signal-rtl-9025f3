// data_fifo: data storage between the packet formatter and the USB link.
//
// A synchronous first-in first-out buffer of DEPTH words of WIDTH bits (block
// RAM) with valid/ready handshakes on both sides.  It absorbs the bursts of the
// packet formatter (1056 words per sample period at up to one word per cycle)
// and the pauses of the USB link; when it is full the formatter stalls.
// Read data is registered: the memory output feeds a one-word output register,
// so `out_valid`/`out_data` come straight from flip-flops.  `level` counts the
// words held, the output register included.
// The paper only names the data storage; the FIFO form and the 4096-word depth
// (about four sample periods) are this design's choices.
module data_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [AW:0]      level
);

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two");

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;     // pointers into the memory
  logic [AW:0]      mem_cnt;

  assign mem_cnt  = wr_ptr - rd_ptr;
  assign in_ready = (mem_cnt != (AW+1)'(DEPTH));

  logic push, pop_mem;
  assign push    = in_valid && in_ready;
  // move a word from memory to the output register when it is empty or being taken
  assign pop_mem = (mem_cnt != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop_mem) begin
        out_data  <= mem[rd_ptr[AW-1:0]];
        rd_ptr    <= rd_ptr + 1'b1;
        out_valid <= 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  assign level = mem_cnt + (AW+1)'(out_valid);

endmodule
