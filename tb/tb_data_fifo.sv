// tb_data_fifo: self-checking test of the data storage FIFO.
// Random pushes and pops against a queue model; checks order and contents of
// every word, the `level` count, back-pressure when full (DEPTH words in memory
// plus one in the output register), and one-word-per-cycle throughput.
module tb_data_fifo;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [31:0] in_data = '0, out_data;
  logic [$clog2(DEPTH):0] level;

  data_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .level
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] model[$];
  int in_pct = 50, out_pct = 50;
  int pops = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(model.size() > 0, "pop from empty model");
      if (model.size() > 0) begin
        check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
        void'(model.pop_front());
      end
      pops++;
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  always @(negedge clk) if (rst_n) begin
    check(level == $bits(level)'(model.size()), $sformatf("level %0d model %0d", level, model.size()));
    check(in_ready == (model.size() < DEPTH + 1) || (level <= DEPTH && model.size() == DEPTH),
          $sformatf("in_ready %b with %0d held", in_ready, model.size()));
    in_valid  = ($urandom_range(99) < in_pct);
    in_data   = $urandom;
    out_ready = ($urandom_range(99) < out_pct);
  end

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // mixed traffic
    repeat (2000) @(posedge clk);
    // fill completely
    in_pct = 100; out_pct = 0;
    repeat (40) @(posedge clk);
    check(!in_ready, "full FIFO must refuse input");
    check(model.size() == DEPTH + 1, $sformatf("full holds %0d", model.size()));
    // streaming: both sides always ready -> one word per cycle
    in_pct = 100; out_pct = 100;
    repeat (5) @(posedge clk);
    t0 = pops;
    repeat (100) @(posedge clk);
    check(pops - t0 == 100, $sformatf("throughput %0d words in 100 cycles", pops - t0));
    // drain
    in_pct = 0; out_pct = 100;
    repeat (40) @(posedge clk);
    check(model.size() == 0 && !out_valid, "drained");
    in_pct = 30; out_pct = 70;
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
