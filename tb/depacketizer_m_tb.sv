// depacketizer_m_tb: self-checking test of the master-side depacketizer.
// Read-response packets (head plus 1..8 data flits) and write-response
// packets (one flit) are offered on both sources, the packet queue and the
// reorder buffer, with random gaps; the AXI R and B channels apply random
// back-pressure. It checks that each packet is restored whole and never
// interleaved with another: read beats with the header's id and resp and
// last on the final beat, one B per write response; that every packet of
// each source comes out in that source's order; that the reorder buffer
// wins when both sources start a packet in the same cycle; and that the
// delivery reports carry the right T-ID and size, at head and tail.
// The expected behaviour follows the document's depacketizer (restore
// packets from either source into AXI form); the checks are this design's own.
`timescale 1ns/1ps
module depacketizer_m_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dir_valid, dir_ready, rel_valid, rel_ready, r_valid, r_ready, b_valid, b_ready;
  flit_t dir_flit, rel_flit;
  axi_r_t r;
  axi_b_t b;
  logic dlv_head, dlv_tail, from_rb;
  logic [TID_W-1:0] dlv_tid;
  logic [SIZE_W-1:0] dlv_size;

  depacketizer_m dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef flit_t fq_t [$];
  fq_t pk_dir [$], pk_rel [$];    // packets per source, in order
  int  n_done = 0, n_both = 0;
  localparam int NP = 500;

  task automatic make_pkt(output fq_t f);
    hdr_t h = '0;
    int n;
    f.delete();
    h.tid = TID_W'($urandom); h.seq = SEQ_W'($urandom); h.resp = 2'($urandom);
    h.len = LEN_W'($urandom);
    h.mtype = ($urandom_range(0, 1) == 1) ? MSG_WR_RESP : MSG_RD_RESP;
    n = (h.mtype == MSG_WR_RESP) ? 1 : int'(h.len) + 2;
    for (int i = 0; i < n; i++)
      f.push_back('{head: (i == 0), tail: (i == n - 1), data: (i == 0) ? hdr2data(h) : $urandom});
  endtask

  // sources: dir is driven at flit granularity, rel too (each holds its own list)
  fq_t sent_dir [$], sent_rel [$];
  initial begin
    fq_t f;
    dir_valid = 0; dir_flit = '0;
    @(posedge rst_n);
    for (int p = 0; p < NP; p++) begin
      make_pkt(f);
      sent_dir.push_back(f);
      foreach (f[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin dir_valid = 0; @(negedge clk); end
        dir_valid = 1; dir_flit = f[i];
        @(posedge clk);
        while (!dir_ready) @(posedge clk);
        #1 dir_valid = 0;
      end
    end
  end
  initial begin
    fq_t f;
    rel_valid = 0; rel_flit = '0;
    @(posedge rst_n);
    for (int p = 0; p < NP; p++) begin
      make_pkt(f);
      sent_rel.push_back(f);
      foreach (f[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin rel_valid = 0; @(negedge clk); end
        rel_valid = 1; rel_flit = f[i];
        @(posedge clk);
        while (!rel_ready) @(posedge clk);
        #1 rel_valid = 0;
      end
    end
  end

  always @(negedge clk) begin
    r_ready <= ($urandom_range(0, 3) != 0);
    b_ready <= ($urandom_range(0, 3) != 0);
  end

  // checker: follows the packet currently being restored
  fq_t cur;
  int  ci = 0;
  bit  busy = 0, cur_rb;
  hdr_t ch;
  always @(posedge clk) if (rst_n) begin
    if (!busy && dlv_head) begin
      // which source started?
      cur_rb = (rel_valid && rel_ready);
      if (rel_valid && dir_valid && rel_flit.head && dir_flit.head) begin
        chk(cur_rb, "reorder buffer first");
        n_both++;
      end
      cur = cur_rb ? sent_rel.pop_front() : sent_dir.pop_front();
      ch = data2hdr(cur[0].data);
      chk(dlv_tid == ch.tid && dlv_size == SIZE_W'(cur.size()), "delivery report");
      ci = 0; busy = 1;
    end
    if (busy) begin
      if (ci == 0) begin
        if (ch.mtype == MSG_WR_RESP) chk(b_valid && b_ready && b.id == ch.tid && b.resp == ch.resp, "write response");
        ci = 1;
      end else if (r_valid && r_ready) begin
        chk(r.id == ch.tid && r.resp == ch.resp && r.data == cur[ci].data && r.last == (ci == cur.size() - 1), "read beat");
        ci++;
      end
      if (dlv_tail) begin
        chk(ci == cur.size(), "tail at packet end");
        busy = 0; n_done++;
      end
    end else begin
      chk(!(r_valid && r_ready), "no beat outside a packet");
    end
    chk(!(b_valid && b_ready) || dlv_head, "B only with a head");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == 2 * NP);
    repeat (5) @(posedge clk);
    chk(n_both > 0, "both sources competed at least once");
    $display("packets %0d, contested starts %0d", n_done, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
