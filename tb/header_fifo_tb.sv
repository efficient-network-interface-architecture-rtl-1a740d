// header_fifo_tb: self-checking test of the header FIFO. Random pushes and
// pops, including pushes when full and pops when empty (both must be
// ignored), are compared every cycle with a queue model: output header,
// full and empty flags. It also checks that the FIFO reaches full and that
// a pushed header is visible the next cycle.
// The header FIFO follows the document's slave-NI diagram; the reference
// model and stimulus are this design's own.
`timescale 1ns/1ps
module header_fifo_tb;
  import noc_pkg::*;
  localparam int D = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, full, empty;
  hdr_t din, dout;

  header_fifo #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hdr_t model [$];
  int n_full = 0;
  bit was_full;

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // bias towards filling in the first half of each 400-cycle window
      push = ($urandom_range(0, 99) < ((c % 400) < 200 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < ((c % 400) < 200 ? 30 : 70));
      din  = hdr_t'($urandom);
      #1;
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      if (model.size() > 0) chk(dout == model[0], "head of FIFO");
      if (full) n_full++;
      @(posedge clk);
      was_full = (model.size() == D);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !was_full) model.push_back(din);
    end
    chk(n_full > 10, "FIFO was full at times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
