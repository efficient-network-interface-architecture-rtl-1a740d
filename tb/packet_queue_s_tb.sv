// packet_queue_s_tb: self-checking test of the slave-side packet queue.
// Random request packets arrive with random gaps; the depacketizer side
// applies random back-pressure and the header FIFO is randomly full. It
// checks that flits leave unchanged and in order, that the header of each
// packet is pushed exactly once, in the cycle its head flit leaves, and
// that a head flit never leaves while the header FIFO is full.
// The expected behaviour follows the document's slave packet queue and
// header FIFO; the checks are this design's own.
`timescale 1ns/1ps
module packet_queue_s_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, hdr_push, hdr_full;
  flit_t in_flit, out_flit;
  hdr_t hdr;

  packet_queue_s dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t exp_q [$];
  int n_out = 0, n_in = 0, n_hdr = 0, n_held = 0;

  always @(negedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    hdr_full  <= ($urandom_range(0, 3) == 0);
  end

  flit_t e;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_flit.head && hdr_full) chk(0, "head offered while header FIFO full");
    if (out_valid && out_ready) begin
      e = exp_q.pop_front();
      chk(out_flit == e, "flit order and content");
      chk(hdr_push == e.head, "header pushed with head flit");
      if (e.head) begin
        chk(hdr == data2hdr(e.data), "pushed header");
        n_hdr++;
      end
      n_out++;
    end else chk(!hdr_push, "no push without a leaving head");
    if (exp_q.size() > 0 && exp_q[0].head && hdr_full && out_ready) n_held++;
  end

  initial begin
    int n;
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 600; p++) begin
      n = $urandom_range(2, 10);
      for (int i = 0; i < n; i++) begin
        flit_t f;
        f.head = (i == 0); f.tail = (i == n - 1); f.data = $urandom;
        exp_q.push_back(f);
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_flit = f;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        n_in++;
        #1 in_valid = 0;
      end
    end
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    chk(n_out == n_in && n_hdr == 600 && n_held > 0, "all flits and headers, stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
