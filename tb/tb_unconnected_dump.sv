// tb_unconnected_dump: the controller with no sensor array attached.
// Every MISO line floats high, so every sample reads FFFF.  A counted run of
// three sample periods is recorded as a byte-addressed upload dump and checked
// against the expected layout: headers BBAA0000, BBAA0010, BBAA0020 ... at
// byte offsets 0x000, 0x084, 0x108 ... (one header + 32 data words = 0x84
// bytes per packet), all data words FFFFFFFF, sequence numbers 0, 1, 2, and the
// ending flag DDCCBBAA as the last word, at byte offset 3*32*0x84.
// Runs the top at its default parameters.
module tb_unconnected_dump;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        h_valid = 1'b0, h_ready;
  logic [31:0] h_data = '0;
  logic        up_valid, up_ready = 1'b1;
  logic [31:0] up_data;
  logic [15:0] sclk, mosi;
  logic [15:0][1:0] cs_n;
  logic [15:0][1:0] miso = '1;     // nothing connected: pulled high
  logic        running;
  logic [15:0] overrun_cnt, tick_miss_cnt, fwd_cnt;
  logic [12:0] fifo_level;

  ccm_top dut (
    .clk, .rst_n, .h_valid, .h_ready, .h_data, .up_valid, .up_ready, .up_data,
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n), .spi_miso(miso),
    .running, .overrun_cnt, .tick_miss_cnt, .fwd_cnt, .fifo_level
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] dump[$];
  always @(posedge clk) if (rst_n && up_valid && up_ready) dump.push_back(up_data);

  localparam int PKT_WORDS = 33;
  localparam int PERIODS   = 3;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); h_valid = 1'b1; h_data = {4'h1, 4'h0, 24'd3};
    @(posedge clk); while (!h_ready) @(posedge clk);
    @(negedge clk); h_valid = 1'b0;
    while (dump.size() < PERIODS * 32 * PKT_WORDS + 1) @(posedge clk);
    repeat (50) @(posedge clk);
    check(dump.size() == PERIODS * 32 * PKT_WORDS + 1, $sformatf("%0d words in the dump", dump.size()));
    for (int i = 0; i < dump.size(); i++) begin
      int p, k, w;
      logic [31:0] e;
      p = i / (32 * PKT_WORDS); k = (i / PKT_WORDS) % 32; w = i % PKT_WORDS;
      if (i == PERIODS * 32 * PKT_WORDS) e = 32'hDDCCBBAA;
      else if (w == 0) e = {16'hBBAA, 8'(p), 4'(k % 4), 4'(k / 4)};
      else e = 32'hFFFF_FFFF;
      check(dump[i] == e, $sformatf("offset %08h: %08h expected %08h", 4 * i, dump[i], e));
    end
    // the first three headers, as in a hex dump of the upload
    check(dump[0] == 32'hBBAA0000 && dump[33] == 32'hBBAA0010 && dump[66] == 32'hBBAA0020,
          "headers at 0x000, 0x084, 0x108");
    check(!running && overrun_cnt == 0, "clean finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
