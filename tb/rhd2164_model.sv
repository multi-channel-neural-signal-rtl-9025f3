// rhd2164_model: behavioural model of one RHD2164 64-channel front-end chip,
// seen from its SPI pins.  Not synthesizable; the amplifiers, multiplexer and
// ADC are replaced by a formula.
//
// SPI: CS_n active low, SCLK idles low, MOSI sampled on the rising edge, 16-bit
// commands.  MISO is double data rate: the channel-A result bit is driven while
// SCLK is low and the channel-B bit while SCLK is high, MSB first.  MISO is
// pulled high while CS_n is high.  A command's result comes out two frames
// later.
// Commands:
//   CONVERT(c) = {2'b00, c[5:0], 8'h00}: A = sample of channel c,
//                B = sample of channel c+32.  CONVERT(0) starts a new sample.
//   WRITE(r,d) = {2'b10, r, d}: register r := d; A = {8'hFF, d}, B = 0.
//   READ(r)    = {2'b11, r, 8'h00}: A = {8'h00, register r}, B = 0.
//   anything else returns A = B = 0.
// Sample value of channel ch in sample n: {CHIP_ID[4:0], ch[5:0], n[4:0]}.
module rhd2164_model #(
  parameter logic [4:0] CHIP_ID = 5'd0
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);

  logic [15:0] rx_sh;
  int          n_rise, n_fall;
  logic [31:0] res1, res2, out_res;   // {B, A}
  logic [7:0]  regs [64];
  int          sample_n;
  int          frames;
  int          writes;

  initial begin
    rx_sh = '0; n_rise = 0; n_fall = 0;
    res1 = '0; res2 = '0; out_res = '0;
    sample_n = -1; frames = 0; writes = 0;
    for (int i = 0; i < 64; i++) regs[i] = '0;
  end

  function automatic logic [15:0] sample_value(input int ch, input int n);
    return {CHIP_ID, 6'(ch), 5'(n)};
  endfunction

  always @(negedge cs_n) begin
    out_res = res2;
    n_rise  = 0;
    n_fall  = 0;
  end

  always @(posedge sclk) if (!cs_n) begin
    rx_sh  = {rx_sh[14:0], mosi};
    n_rise = n_rise + 1;
  end

  always @(negedge sclk) if (!cs_n) n_fall = n_fall + 1;

  always @(posedge cs_n) if (n_rise == 16) begin
    logic [31:0] r;
    logic [5:0]  c;
    c = rx_sh[13:8];
    unique case (rx_sh[15:14])
      2'b00: begin
        if (c == 6'd0) sample_n = sample_n + 1;
        if (c < 6'd32) r = {sample_value(int'(c) + 32, sample_n), sample_value(int'(c), sample_n)};
        else           r = '0;
      end
      2'b10: begin
        regs[c] = rx_sh[7:0];
        writes  = writes + 1;
        r = {16'h0000, 8'hFF, rx_sh[7:0]};
      end
      2'b11: r = {16'h0000, 8'h00, regs[c]};
      default: r = '0;
    endcase
    res2   = res1;
    res1   = r;
    frames = frames + 1;
  end

  logic [3:0] bit_i;
  assign bit_i = 4'(15 - n_fall);
  logic [15:0] out_a, out_b;
  assign out_a = out_res[15:0];
  assign out_b = out_res[31:16];
  assign miso  = cs_n ? 1'b1 : (sclk ? out_b[bit_i] : out_a[bit_i]);

endmodule
