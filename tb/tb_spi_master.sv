// tb_spi_master: self-checking test of the 16-bit DDR SPI master.
// A slave written in this bench drives random channel-A/B words on each MISO
// line (A while SCLK is low, B while high) and records MOSI on rising edges.
// Checks: the command seen by the slave, rx_a/rx_b of every selected chip,
// chip selects that follow the mask, SCLK at SYS/(2*HALF) (24 MHz from
// 96 MHz), and the frame length from CS fall to done.
module tb_spi_master;
  import ncr_pkg::*;

  localparam int unsigned HALF   = 2;      // system clocks per SCLK half period
  localparam int unsigned CS_GAP = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic spi_ce;
  int   ce_cnt = 0;
  always_ff @(posedge clk) begin
    ce_cnt <= (ce_cnt == HALF - 1) ? 0 : ce_cnt + 1;
  end
  assign spi_ce = (ce_cnt == HALF - 1);

  logic        start = 1'b0;
  logic [15:0] cmd = '0;
  logic [1:0]  cs_mask = '0;
  logic        busy, done, sclk, mosi;
  logic [1:0][15:0] rx_a, rx_b;
  logic [1:0]  cs_n, miso;

  spi_master #(.N_CS(2), .CS_GAP(CS_GAP)) dut (
    .clk, .rst_n, .spi_ce, .start, .cmd, .cs_mask, .busy, .done, .rx_a, .rx_b,
    .sclk, .mosi, .cs_n, .miso
  );

  // ---- bench slave ----
  logic [1:0][15:0] sa, sb;
  logic [15:0]      got_cmd;
  int               nfall, nrise;
  always @(negedge sclk) nfall = nfall + 1;
  always @(posedge sclk) begin nrise = nrise + 1; got_cmd = {got_cmd[14:0], mosi}; end
  for (genvar c = 0; c < 2; c++) begin : g_sl
    assign miso[c] = cs_n[c] ? 1'b1 : (sclk ? sb[c][15 - (nfall % 16)] : sa[c][15 - (nfall % 16)]);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycle counting
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  longint t_csfall, t_rise0, t_rise1;

  task automatic frame(input logic [15:0] c, input logic [1:0] m);
    for (int k = 0; k < 2; k++) begin sa[k] = 16'($urandom); sb[k] = 16'($urandom); end
    nfall = 0; nrise = 0; got_cmd = '0;
    @(posedge clk);
    cmd <= c; cs_mask <= m; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (cs_n != 2'b11 || done);
    t_csfall = cyc;
    @(posedge sclk); t_rise0 = cyc;
    @(posedge sclk); t_rise1 = cyc;
    while (!done) @(posedge clk);
    check(got_cmd == c, $sformatf("MOSI %h expected %h", got_cmd, c));
    check(nrise == 16, $sformatf("%0d rising edges", nrise));
    check(t_rise1 - t_rise0 == 2 * HALF, $sformatf("SCLK period %0d cycles", t_rise1 - t_rise0));
    check(cyc - t_csfall == (33 + CS_GAP) * HALF,
          $sformatf("CS fall to done %0d cycles, expected %0d", cyc - t_csfall, (33 + CS_GAP) * HALF));
    for (int k = 0; k < 2; k++) if (m[k]) begin
      check(rx_a[k] == sa[k], $sformatf("chip %0d A %h expected %h", k, rx_a[k], sa[k]));
      check(rx_b[k] == sb[k], $sformatf("chip %0d B %h expected %h", k, rx_b[k], sb[k]));
    end
    check(cs_n == 2'b11 && !sclk, "bus idle after frame");
  endtask

  // chip selects must follow the mask during a frame
  always @(negedge clk) if (rst_n && busy && cs_n != 2'b11)
    if (cs_n != ~cs_mask) begin failures++; $display("FAIL: cs_n %b for mask %b", cs_n, cs_mask); end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(cs_n == 2'b11 && !sclk && !busy, "idle after reset");
    frame(cmd_convert(6'd5), 2'b11);
    frame(16'hA5C3, 2'b01);
    frame(16'h8123, 2'b10);
    for (int i = 0; i < 20; i++) frame(16'($urandom), 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
