// tb_ccm_top: end-to-end test of the recording controller at its default size
// (16 sensor units x 2 RHD2164 chips = 2048 channels, 96 MHz clock, 24 MHz
// SCLK, 30 kS/s, 4096-word FIFO).
// Sensor units 0..14 carry behavioural chip models whose samples follow a
// formula; unit 15 is left unconnected, so its MISO lines float high and its
// packets must read FFFFFFFF.  The bench issues host instructions, decodes the
// whole upload stream and checks every header and data word.
// Scenario: forward a register write to all chips; a counted run of 2 periods
// at the default rate (period length checked: 3200 cycles = 30 kS/s); a
// continuous run at a reprogrammed period with the USB side stalled, so the
// FIFO fills, the formatter stalls and periods are dropped, ended by STOP; a
// run at a period too short for 34 SPI frames, so ticks are missed.
// Every mechanism is counted and a failure is counted for one never seen.
module tb_ccm_top;
  import ncr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        h_valid = 1'b0, h_ready;
  logic [31:0] h_data = '0;
  logic        up_valid, up_ready = 1'b1;
  logic [31:0] up_data;
  logic [15:0] sclk, mosi;
  logic [15:0][1:0] cs_n, miso;
  logic        running;
  logic [15:0] overrun_cnt, tick_miss_cnt, fwd_cnt;
  logic [12:0] fifo_level;

  ccm_top dut (
    .clk, .rst_n, .h_valid, .h_ready, .h_data, .up_valid, .up_ready, .up_data,
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n), .spi_miso(miso),
    .running, .overrun_cnt, .tick_miss_cnt, .fwd_cnt, .fifo_level
  );

  localparam int N_CONN = 15;   // sensor units with chips attached

  for (genvar s = 0; s < 16; s++) begin : g_su
    for (genvar c = 0; c < 2; c++) begin : g_chip
      if (s < N_CONN) begin : g_model
        rhd2164_model #(.CHIP_ID(5'(2 * s + c))) u_chip (
          .cs_n(cs_n[s][c]), .sclk(sclk[s]), .mosi(mosi[s]), .miso(miso[s][c])
        );
      end else begin : g_open
        assign miso[s][c] = 1'b1;    // pulled up, nothing connected
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // ---------------- upload stream decoder ----------------
  int     base_n = 0;          // samples converted before the current run
  int     pkt_k = 0, word_w = 0;
  bit     in_pkt = 0;
  logic [7:0] cur_seq;
  int     periods_seen = 0, end_flags = 0, ffff_words = 0, data_words = 0;
  longint t_period[$];
  logic [7:0] seq_list[$];

  function automatic logic [15:0] sample_value(input int id, input int ch, input int n);
    return {5'(id), 6'(ch), 5'(n)};
  endfunction

  always @(posedge clk) if (rst_n && up_valid && up_ready) begin
    if (!in_pkt) begin
      if (up_data == END_FLAG) begin
        end_flags++;
        check(pkt_k == 0, "ending flag inside a period");
      end else begin
        check(up_data[31:16] == MAGIC, $sformatf("header expected, got %h", up_data));
        if (pkt_k == 0) begin
          cur_seq = up_data[15:8];
          periods_seen++;
          t_period.push_back(cyc);
          seq_list.push_back(cur_seq);
        end
        check(up_data[15:8] == cur_seq, "sequence number constant within a period");
        check(up_data[7:0] == {4'(pkt_k % 4), 4'(pkt_k / 4)},
              $sformatf("packet %0d header %h", pkt_k, up_data));
        in_pkt = 1; word_w = 0;
      end
    end else begin
      int su, chip, id, n;
      logic [31:0] e;
      su = pkt_k / 2; chip = pkt_k % 2; id = 2 * su + chip;
      n  = base_n + int'(cur_seq);
      if (su < N_CONN) e = {sample_value(id, word_w + 32, n), sample_value(id, word_w, n)};
      else begin e = 32'hFFFF_FFFF; ffff_words++; end
      check(up_data == e, $sformatf("seq %0d pkt %0d word %0d: %h expected %h",
                                    cur_seq, pkt_k, word_w, up_data, e));
      data_words++;
      word_w++;
      if (word_w == 32) begin
        in_pkt = 0;
        pkt_k = (pkt_k + 1) % 32;
      end
    end
  end

  // mechanisms
  int stalls = 0, fifo_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pkt.out_valid && !dut.u_pkt.out_ready) stalls++;
    if (fifo_level == 13'd4097) fifo_full++;
  end

  task automatic host(input logic [31:0] w);
    @(negedge clk);
    h_valid = 1'b1; h_data = w;
    @(posedge clk);
    while (!h_ready) @(posedge clk);
    @(negedge clk);
    h_valid = 1'b0;
  endtask

  task automatic wait_end_flag(input int k);
    while (end_flags < k) @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- 1: forwarded register write WRITE(5, 0x3C) to both chips ----
    host({4'h3, 10'h0, 2'b11, 2'b10, 6'd5, 8'h3C});
    repeat (200) @(posedge clk);
    check(fwd_cnt == 16'd1, "forwarded command executed");
    check(g_su[0].g_chip[0].g_model.u_chip.regs[5] == 8'h3C &&
          g_su[14].g_chip[1].g_model.u_chip.regs[5] == 8'h3C &&
          g_su[7].g_chip[1].g_model.u_chip.writes == 1, "register written in the chips");

    // ---- 2: counted run of 2 periods at 30 kS/s ----
    host({4'h1, 4'h0, 24'd2});
    wait_end_flag(1);
    check(periods_seen == 2, $sformatf("%0d periods in the counted run", periods_seen));
    check(t_period.size() == 2 && t_period[1] - t_period[0] == 3200,
          $sformatf("sample period %0d cycles, expected 3200", t_period[1] - t_period[0]));
    check(!running, "counted run stopped by itself");
    base_n = 2;

    // ---- 3: new rate, continuous run, USB side stalled -> overruns, STOP ----
    host({4'h4, 12'h0, 16'd2900});
    t_period.delete(); seq_list.delete();
    periods_seen = 0;
    @(negedge clk); up_ready = 1'b0;
    host({4'h1, 4'h0, 24'd0});
    while (overrun_cnt < 16'd2) @(posedge clk);
    @(negedge clk); up_ready = 1'b1;
    repeat (3 * 2900) @(posedge clk);
    host({4'h2, 28'h0});
    wait_end_flag(2);
    check(seq_list.size() + int'(overrun_cnt) == int'(seq_list[seq_list.size() - 1]) + 1,
          $sformatf("%0d periods uploaded + %0d dropped != last seq %0d + 1",
                    seq_list.size(), overrun_cnt, seq_list[seq_list.size() - 1]));
    begin
      int gaps, last;
      gaps = 0; last = seq_list.size() - 1;
      for (int i = 1; i <= last; i++) if (seq_list[i] != seq_list[i-1] + 8'd1) gaps++;
      check(gaps > 0, "dropped periods leave a gap in the sequence numbers");
      // once the FIFO has drained, headers again come one period apart
      check(t_period[last] - t_period[last-1] == 2900,
            $sformatf("reprogrammed period %0d cycles", t_period[last] - t_period[last-1]));
    end
    base_n = base_n + int'(seq_list[seq_list.size() - 1]) + 1;

    // ---- 4: period too short for 34 SPI frames -> missed ticks ----
    host({4'h4, 12'h0, 16'd1500});
    seq_list.delete();
    host({4'h1, 4'h0, 24'd3});
    wait_end_flag(3);
    check(seq_list.size() == 3, "three periods in the short-period run");
    check(tick_miss_cnt >= 16'd2, $sformatf("tick_miss_cnt %0d", tick_miss_cnt));
    repeat (20) @(posedge clk);
    check(!up_valid && fifo_level == 0, "everything uploaded");

    // ---- mechanisms seen ----
    check(fwd_cnt == 16'd1,          "mechanism: forwarded SPI command");
    check(end_flags == 3,            "mechanism: ending flag (counted runs and STOP)");
    check(stalls > 0,                "mechanism: formatter stalled by a full FIFO");
    check(fifo_full > 0,             "mechanism: FIFO full");
    check(overrun_cnt >= 16'd2,      "mechanism: period dropped on overrun");
    check(tick_miss_cnt > 0,         "mechanism: tick missed");
    check(ffff_words > 0,            "mechanism: unconnected unit reads FFFF");
    $display("mechanisms: fwd=%0d end_flags=%0d stall_cycles=%0d fifo_full_cycles=%0d overruns=%0d tick_misses=%0d ffff_words=%0d data_words=%0d",
             fwd_cnt, end_flags, stalls, fifo_full, overrun_cnt, tick_miss_cnt, ffff_words, data_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
