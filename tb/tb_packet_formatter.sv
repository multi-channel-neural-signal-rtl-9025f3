// tb_packet_formatter: self-checking test of the upload packet framing.
// The bench plays the sample buffer with a formula for every word, hands the
// formatter sample periods with chosen sequence numbers and banks, and checks
// the whole output stream: 32 packets of a header {BBAA, seq, group, channel}
// and 32 data words each, then the ending flag DDCCBBAA on request.  It also
// checks that a period takes 1056 cycles when the stream is never stalled and
// that stalls lose or repeat no word.
module tb_packet_formatter;
  import ncr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        frame_valid = 1'b0, frame_bank = 1'b0, busy, end_req = 1'b0, end_ack;
  logic [7:0]  frame_seq = '0;
  logic        rd_bank;
  logic [3:0]  rd_su;
  logic [0:0]  rd_chip;
  logic [4:0]  rd_addr;
  logic [31:0] rd_data, out_data;
  logic        out_valid, out_ready = 1'b1;

  packet_formatter #(.NSU(16), .NCS(2)) dut (
    .clk, .rst_n, .frame_valid, .frame_bank, .frame_seq, .busy, .end_req, .end_ack,
    .rd_bank, .rd_su, .rd_chip, .rd_addr, .rd_data, .out_valid, .out_ready, .out_data
  );

  function automatic logic [31:0] word_of(input logic b, input int su, input int chip, input int a);
    return {4'hC, 3'b000, b, 4'(su), 3'b000, 1'(chip), 3'b000, 5'(a), 8'h5A};
  endfunction
  assign rd_data = word_of(rd_bank, int'(rd_su), int'(rd_chip), int'(rd_addr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected stream
  logic [31:0] expq[$];
  int          got = 0;
  int          stall_pct = 0;

  task automatic expect_period(input logic [7:0] seq, input logic b);
    for (int k = 0; k < 32; k++) begin
      expq.push_back({16'hBBAA, seq, 4'(k % 4), 4'(k / 4)});
      for (int w = 0; w < 32; w++) expq.push_back(word_of(b, k / 2, k % 2, w));
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got++;
    if (expq.size() == 0) begin
      check(1'b0, $sformatf("unexpected word %h", out_data));
    end else begin
      check(out_data == expq[0], $sformatf("word %0d: %h expected %h", got, out_data, expq[0]));
      void'(expq.pop_front());
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(99) >= stall_pct);

  int busy_cycles = 0;
  always @(negedge clk) if (busy) busy_cycles++;

  task automatic send_period(input logic [7:0] seq, input logic b);
    expect_period(seq, b);
    @(negedge clk);
    check(!busy, "idle before a period");
    frame_valid = 1'b1; frame_seq = seq; frame_bank = b;
    @(negedge clk);
    frame_valid = 1'b0; frame_seq = 8'hEE;  // inputs must have been captured
    while (busy) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // unstalled: 32 x 33 words, one per cycle
    busy_cycles = 0;
    send_period(8'h00, 1'b0);
    check(busy_cycles == 1056, $sformatf("period took %0d cycles, expected 1056", busy_cycles));
    check(expq.size() == 0, "all words of period 0 seen");
    // stalled stream, other bank, other sequence numbers
    stall_pct = 40;
    send_period(8'h01, 1'b1);
    send_period(8'hFF, 1'b0);
    check(expq.size() == 0, "all words of stalled periods seen");
    // ending flag
    expq.push_back(32'hDDCCBBAA);
    @(negedge clk); end_req = 1'b1;
    while (!end_ack) @(posedge clk);
    @(negedge clk); end_req = 1'b0;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "ending flag seen");
    check(!busy && !out_valid, "idle after ending flag");
    // a frame and an end request together: the frame goes first
    stall_pct = 0;
    expect_period(8'h42, 1'b1);
    expq.push_back(32'hDDCCBBAA);
    @(negedge clk); frame_valid = 1'b1; frame_seq = 8'h42; frame_bank = 1'b1; end_req = 1'b1;
    @(negedge clk); frame_valid = 1'b0;
    while (!end_ack) @(posedge clk);
    @(negedge clk); end_req = 1'b0;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "period then ending flag");
    check(got == 4 * 1056 + 2, $sformatf("%0d words in total", got));
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
