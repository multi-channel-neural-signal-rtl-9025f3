// tb_sample_buffer: self-checking test of the double-banked sample buffer.
// Fills both banks of every sensor unit with random words in all-units-at-once
// writes, keeps a copy, then reads every (bank, unit, chip, word) back through
// the single asynchronous read port, also while the other bank is written.
module tb_sample_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       we = 1'b0, wr_bank = 1'b0, rd_bank = 1'b0;
  logic [4:0]                 wr_addr = '0, rd_addr = '0;
  logic [15:0][1:0][31:0]     wdata = '0;
  logic [3:0]                 rd_su = '0;
  logic [0:0]                 rd_chip = '0;
  logic [31:0]                rdata;

  sample_buffer #(.NSU(16), .NCS(2), .WORDS(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] ref_mem [2][16][2][32];

  task automatic write_bank(input logic b);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1'b1; wr_bank = b; wr_addr = 5'(a);
      for (int s = 0; s < 16; s++) for (int c = 0; c < 2; c++) begin
        wdata[s][c] = $urandom;
        ref_mem[b][s][c][a] = wdata[s][c];
      end
    end
    @(negedge clk); we = 1'b0;
  endtask

  task automatic read_all(input logic b);
    for (int s = 0; s < 16; s++) for (int c = 0; c < 2; c++) for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      rd_bank = b; rd_su = 4'(s); rd_chip = 1'(c); rd_addr = 5'(a);
      #1;
      check(rdata == ref_mem[b][s][c][a],
            $sformatf("bank %0d su %0d chip %0d word %0d: %h expected %h", b, s, c, a, rdata, ref_mem[b][s][c][a]));
    end
  endtask

  initial begin
    write_bank(1'b0);
    write_bank(1'b1);
    read_all(1'b0);
    read_all(1'b1);
    // write bank 0 again while bank 1 is read: bank 1 must be untouched
    fork
      write_bank(1'b0);
      read_all(1'b1);
    join
    read_all(1'b0);
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
