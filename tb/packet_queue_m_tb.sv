// packet_queue_m_tb: self-checking test of the master-side packet queue.
// Random response packets (1..9 flits) arrive from the router side with
// random gaps. The test plays the reorder unit with a fixed rule (a packet
// is in order when the low bits of its T-ID and sequence number differ) and
// checks that the lookup carries the head's T-ID and sequence number, that
// each packet leaves whole, in arrival order, on the output its decision
// names, and that no flit is lost, under random back-pressure on both
// outputs.
// The steering rule under test follows the document's packet queue; the
// stimulus and reference model are this design's own.
`timescale 1ns/1ps
module packet_queue_m_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, lk_inorder, dir_valid, dir_ready, st_valid, st_ready;
  flit_t in_flit, dir_flit, st_flit;
  logic [TID_W-1:0] lk_tid;
  logic [SEQ_W-1:0] lk_seq;

  packet_queue_m dut (.*);

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

  assign lk_inorder = (lk_tid[0] != lk_seq[0]);

  flit_t exp_q [$];
  bit    route_q [$];     // 1 = reorder buffer
  int    n_dir = 0, n_st = 0, n_out = 0, n_in = 0;

  always @(negedge clk) begin
    dir_ready <= ($urandom_range(0, 2) != 0);
    st_ready  <= ($urandom_range(0, 3) != 0);
  end

  bit in_pkt = 0; bit cur_rb;
  flit_t e;
  hdr_t  h;
  always @(posedge clk) if (rst_n) begin
    chk(!(dir_valid && st_valid), "one output at a time");
    if ((dir_valid && dir_ready) || (st_valid && st_ready)) begin
      e = exp_q.pop_front();
      if (!in_pkt) begin
        cur_rb = route_q.pop_front();
        h = data2hdr(e.data);
        chk(lk_tid == h.tid && lk_seq == h.seq, "lookup carries T-ID and seq");
        if (cur_rb) n_st++; else n_dir++;
      end
      chk((st_valid && st_ready) == cur_rb, "packet on decided output");
      chk((cur_rb ? st_flit : dir_flit) == e, "flit content and order");
      in_pkt = !e.tail;
      n_out++;
    end
  end

  initial begin
    hdr_t hh; int n;
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 800; p++) begin
      hh = '0; hh.tid = TID_W'($urandom); hh.seq = SEQ_W'($urandom); hh.mtype = MSG_RD_RESP;
      n = $urandom_range(1, 9);
      route_q.push_back(hh.tid[0] == hh.seq[0]);
      for (int i = 0; i < n; i++) begin
        flit_t f;
        f.head = (i == 0); f.tail = (i == n - 1);
        f.data = (i == 0) ? hdr2data(hh) : $urandom;
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
    repeat (5) @(posedge clk);
    chk(n_out == n_in && n_dir > 100 && n_st > 100, "all flits out, both routes used");
    $display("direct %0d stored %0d", n_dir, n_st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
