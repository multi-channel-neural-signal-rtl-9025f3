// tb_clock_manager: checks the SCLK enable and the sample tick.
// At 96 MHz / 24 MHz the SPI enable must come every 2 cycles; the sample tick
// every `period` cycles (3200 = 30 kS/s, then a reprogrammed 100), and the
// first tick after `restart` one full period later.
module tb_clock_manager;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] period = 16'd3200;
  logic        restart = 1'b0, spi_ce, sample_tick;

  clock_manager #(.SYS_CLK_HZ(96_000_000), .SCLK_HZ(24_000_000)) dut (
    .clk, .rst_n, .period, .restart, .spi_ce, .sample_tick
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0, last_ce = -1, last_tick = -1;
  longint exp_tick_gap = 3200;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (spi_ce) begin
      if (last_ce >= 0) check(cyc - last_ce == 2, $sformatf("spi_ce gap %0d", cyc - last_ce));
      last_ce = cyc;
    end
    // restart clears the counter like a tick does, one cycle earlier
    if (restart) last_tick = cyc + 1;
    if (sample_tick) begin
      if (last_tick >= 0) check(cyc - last_tick == exp_tick_gap,
                                $sformatf("tick gap %0d expected %0d", cyc - last_tick, exp_tick_gap));
      last_tick = cyc;
    end
  end

  int n_ticks;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 4 periods at the default rate
    n_ticks = 0;
    while (n_ticks < 4) begin @(posedge clk); if (sample_tick) n_ticks++; end
    // reprogram: the period in flight ends at the old count, later ones are 100
    // (a count already past the new period ends the period in flight at once)
    repeat (500) @(posedge clk);
    @(negedge clk); period = 16'd100; exp_tick_gap = 100; last_tick = -1;
    n_ticks = 0;
    while (n_ticks < 5) begin @(posedge clk); if (sample_tick) n_ticks++; end
    // restart realigns: the next tick is a full period after the restart
    repeat (37) @(posedge clk);
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    n_ticks = 0;
    while (n_ticks < 3) begin @(posedge clk); if (sample_tick) n_ticks++; end
    check(checks > 30, "enough events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
