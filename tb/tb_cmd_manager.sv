// tb_cmd_manager: self-checking test of the instruction parser and the
// acquisition sequencer.  The bench stands in for the SPI masters (done a
// fixed time after each start), the clock manager (sample ticks on demand) and
// the packet formatter (busy on demand).  It checks, for each sample period,
// the 34 commands CONVERT(0..31), DUMMY, DUMMY to both chips, the buffer writes
// to words 0..31 from frame 2 on, alternating banks, the sequence numbers, the
// end of a counted run with the ending-flag request, STOP of a continuous run,
// forwarding of a host SPI command, the period register, an overrun (formatter
// still busy) and a missed tick (period too short).
module tb_cmd_manager;
  import ncr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        h_valid = 1'b0, h_ready;
  logic [31:0] h_data = '0;
  logic [15:0] period;
  logic        tick_restart, sample_tick = 1'b0;
  logic        spi_start, spi_done = 1'b0;
  logic [15:0] spi_cmd;
  logic [1:0]  spi_mask;
  logic        buf_we, buf_bank;
  logic [4:0]  buf_addr;
  logic        frame_valid, frame_bank, pk_busy = 1'b0, end_req, end_ack = 1'b0;
  logic [7:0]  frame_seq;
  logic        running;
  logic [15:0] overrun_cnt, tick_miss_cnt, fwd_cnt;

  cmd_manager #(.NCS(2), .DEF_PERIOD(16'd3200)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- SPI stand-in: done 6 cycles after start ----
  int          spi_left = 0;
  logic [15:0] cmds[$];
  logic [1:0]  masks[$];
  always @(posedge clk) if (rst_n) begin
    spi_done <= (spi_left == 1);
    if (spi_left > 0) spi_left <= spi_left - 1;
    if (spi_start) begin
      check(spi_left == 0, "start while a frame runs");
      cmds.push_back(spi_cmd);
      masks.push_back(spi_mask);
      spi_left <= 6;
    end
  end

  // ---- buffer writes and frames handed over ----
  int   wr_addrs[$];
  logic wr_banks[$];
  logic [7:0] seqs[$];
  logic fbanks[$];
  int   restarts = 0;
  always @(posedge clk) if (rst_n) begin
    if (buf_we) begin wr_addrs.push_back(int'(buf_addr)); wr_banks.push_back(buf_bank); end
    if (frame_valid) begin seqs.push_back(frame_seq); fbanks.push_back(frame_bank); end
    if (tick_restart) restarts++;
  end

  task automatic host(input logic [31:0] w);
    @(negedge clk);
    h_valid = 1'b1; h_data = w;
    @(posedge clk);
    while (!h_ready) @(posedge clk);
    @(negedge clk);
    h_valid = 1'b0;
  endtask

  task automatic tick();
    @(negedge clk); sample_tick = 1'b1;
    @(negedge clk); sample_tick = 1'b0;
  endtask

  task automatic wait_period_done();
    repeat (34 * 9 + 20) @(posedge clk);
  endtask

  // check one sample period's commands and writes, taken from the queues
  task automatic check_period(input logic bank);
    check(cmds.size() == 34, $sformatf("%0d commands in a period", cmds.size()));
    for (int j = 0; j < 34 && cmds.size() > 0; j++) begin
      logic [15:0] e;
      e = (j < 32) ? cmd_convert(6'(j)) : CMD_DUMMY;
      check(cmds[0] == e && masks[0] == 2'b11, $sformatf("frame %0d cmd %h expected %h", j, cmds[0], e));
      void'(cmds.pop_front()); void'(masks.pop_front());
    end
    check(wr_addrs.size() == 32, $sformatf("%0d buffer writes", wr_addrs.size()));
    for (int w = 0; w < 32 && wr_addrs.size() > 0; w++) begin
      check(wr_addrs[0] == w && wr_banks[0] == bank, $sformatf("write %0d to %0d bank %b", w, wr_addrs[0], wr_banks[0]));
      void'(wr_addrs.pop_front()); void'(wr_banks.pop_front());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(period == 16'd3200 && !running, "reset state");

    // ---- sampling-rate setting ----
    host({4'h4, 12'h000, 16'd1600});
    @(posedge clk);
    check(period == 16'd1600, "SET_PERIOD");

    // ---- forwarded SPI command while idle ----
    host({4'h3, 10'h0, 2'b01, 16'h8A5C});
    repeat (20) @(posedge clk);
    check(cmds.size() == 1 && cmds[0] == 16'h8A5C && masks[0] == 2'b01, "forwarded command");
    check(fwd_cnt == 16'd1, "fwd_cnt");
    cmds.delete(); masks.delete();

    // ---- counted run of 3 periods ----
    host({4'h1, 4'h0, 24'd3});
    check(running && restarts == 1, "START");
    // a host SPI command is held off during a run
    @(negedge clk); h_valid = 1'b1; h_data = {4'h3, 10'h0, 2'b11, 16'h1234};
    repeat (3) @(posedge clk);
    check(!h_ready, "SPI command refused while running");
    @(negedge clk); h_valid = 1'b0;
    for (int p = 0; p < 3; p++) begin
      check(running, "running during the run");
      tick();
      wait_period_done();
      check_period(1'(p));
    end
    check(seqs.size() == 3 && seqs[0] == 0 && seqs[1] == 1 && seqs[2] == 2, "sequence numbers 0,1,2");
    check(fbanks.size() == 3 && fbanks[0] == 0 && fbanks[1] == 1 && fbanks[2] == 0, "banks handed over");
    check(!running && end_req, "run ended, ending flag requested");
    @(negedge clk); end_ack = 1'b1;
    @(negedge clk); end_ack = 1'b0;
    check(!end_req, "end_req dropped on ack");
    seqs.delete(); fbanks.delete();

    // ticks while idle do nothing
    tick();
    repeat (20) @(posedge clk);
    check(cmds.size() == 0, "no conversion while idle");

    // ---- continuous run with an overrun, a missed tick and STOP ----
    host({4'h1, 4'h0, 24'd0});
    tick(); wait_period_done(); check_period(1'b1);   // bank continues from 1
    // formatter busy at the end of the next period -> dropped
    pk_busy = 1'b1;
    tick(); repeat (50) @(posedge clk);
    tick();                                            // arrives mid-period
    wait_period_done();
    check_period(1'b0);
    check(overrun_cnt == 16'd1, $sformatf("overrun_cnt %0d", overrun_cnt));
    check(tick_miss_cnt == 16'd1, $sformatf("tick_miss_cnt %0d", tick_miss_cnt));
    pk_busy = 1'b0;
    host({4'h2, 28'h0});                               // STOP
    check(running, "STOP waits for the period end");
    tick(); wait_period_done(); check_period(1'b0);    // the dropped period's bank is reused
    check(!running && end_req, "stopped, ending flag requested");
    check(seqs.size() == 2 && seqs[0] == 0 && seqs[1] == 2, "sequence 1 skipped by the overrun");
    check(fbanks.size() == 2 && fbanks[0] == 1 && fbanks[1] == 0, "banks with overrun");
    @(negedge clk); end_ack = 1'b1;
    @(negedge clk); end_ack = 1'b0;
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
