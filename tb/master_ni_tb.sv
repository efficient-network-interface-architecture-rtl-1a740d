// master_ni_tb: self-checking test of the master-side NI. A random master
// issues AXI reads and writes (1..8 beats) on four transaction IDs. A
// behavioural stand-in for network and slaves takes each request packet,
// checks its write data, builds the response packet (read data and resp
// codes follow a known address pattern) and returns the responses after a
// random delay in random order, so responses of one ID regularly overtake
// each other. The test checks that the master receives, per ID, its read
// data and its write responses in the order it issued them with the right
// data, last flags and resp codes, and that the sequence numbers in the
// request packets count up per ID. It counts admittance refusals, packets
// parked in and released from the reorder buffer and packets delivered
// directly, and fails if any of them never happened.
`timescale 1ns/1ps
module master_ni_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic aw_valid, aw_ready, w_valid, w_ready, ar_valid, ar_ready, r_valid, r_ready, b_valid, b_ready;
  axi_a_t aw, ar;
  axi_w_t w;
  axi_r_t r;
  axi_b_t b;
  logic req_valid, req_ready, resp_valid, resp_ready;
  flit_t req_flit, resp_flit;
  logic adm_attempt, adm_refused, pkt_to_rb, pkt_from_rb, map_err;
  logic [5:0] size_aom, rb_used;

  master_ni dut (.clk, .rst_n, .node_x(3'd0), .node_y(3'd0), .*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  localparam int N = 300;           // reads and writes each
  axi_a_t rd_q [NUM_TID][$], wr_q [NUM_TID][$];
  int n_rd_done = 0, n_wr_done = 0, n_refused = 0, n_to_rb = 0, n_from_rb = 0, n_direct = 0, n_dlv = 0;

  // ---------------- master core ----------------
  initial begin
    aw_valid = 0; aw = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      aw_valid = 1;
      aw = '{id: TID_W'($urandom_range(0, 3)), addr: {5'($urandom_range(0, 24)), 27'($urandom)} & 32'hFFFF_FFFC,
             len: LEN_W'($urandom)};
      @(posedge clk);
      while (!aw_ready) @(posedge clk);
      wr_q[aw.id].push_back(aw);
      #1 aw_valid = 0;
      for (int k = 0; k <= int'(aw.len); k++) begin
        @(negedge clk);
        w_valid = 1; w = '{data: pat(aw.addr + 32'(4 * k)), last: (k == int'(aw.len))};
        @(posedge clk);
        while (!w_ready) @(posedge clk);
        #1 w_valid = 0;
      end
    end
  end
  initial begin
    ar_valid = 0; ar = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      ar_valid = 1;
      ar = '{id: TID_W'($urandom_range(0, 3)), addr: {5'($urandom_range(0, 24)), 27'($urandom)} & 32'hFFFF_FFFC,
             len: LEN_W'($urandom)};
      @(posedge clk);
      while (!ar_ready) @(posedge clk);
      rd_q[ar.id].push_back(ar);
      #1 ar_valid = 0;
    end
  end
  initial w_valid = 0;

  always @(negedge clk) begin
    r_ready <= ($urandom_range(0, 4) != 0);
    b_ready <= ($urandom_range(0, 4) != 0);
  end

  // ---------------- response checker ----------------
  int rbeat = 0;
  axi_a_t cur;
  always @(posedge clk) if (rst_n) begin
    if (r_valid && r_ready) begin
      cur = rd_q[r.id][0];
      chk(r.data == pat(cur.addr + 32'(4 * rbeat)), "read data in issue order");
      chk(r.resp == {1'b0, cur.addr[2]}, "read resp");
      chk(r.last == (rbeat == int'(cur.len)), "read last");
      if (r.last) begin void'(rd_q[r.id].pop_front()); rbeat = 0; n_rd_done++; end
      else rbeat++;
    end
    if (b_valid && b_ready) begin
      cur = wr_q[b.id].pop_front();
      chk(b.resp == {1'b0, cur.addr[2]}, "write response in issue order");
      n_wr_done++;
    end
    if (adm_refused) n_refused++;
    if (pkt_to_rb) n_to_rb++;
    if (pkt_from_rb) n_from_rb++;
    if (r_valid && r_ready && r.last) n_dlv++;
    if (b_valid && b_ready) n_dlv++;
  end

  // ---------------- network and slaves stand-in ----------------
  typedef flit_t fq_t [$];
  typedef struct { fq_t f; longint ready_at; } rp_t;
  rp_t    pool [$];
  fq_t    inpkt;
  longint now = 0;
  hdr_t   rh, oh, ph;
  logic [31:0] raddr;

  always @(negedge clk) req_ready <= ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    now++;
    if (req_valid && req_ready) begin
      inpkt.push_back(req_flit);
      if (req_flit.tail) begin
        rp_t p;
        rh = data2hdr(inpkt[0].data);
        raddr = inpkt[1].data;
        // no response still held by the network may carry the same ID and number
        foreach (pool[i]) begin
          ph = data2hdr(pool[i].f[0].data);
          if (ph.tid == rh.tid) chk(ph.seq != rh.seq, "sequence number unique among outstanding");
        end
        chk(rh.dst_x == COORD_W'(int'(raddr[31:27]) % 5) && rh.dst_y == COORD_W'(int'(raddr[31:27]) / 5), "destination");
        oh = rh; oh.mtype = (rh.mtype == MSG_WR_REQ) ? MSG_WR_RESP : MSG_RD_RESP; oh.resp = {1'b0, raddr[2]};
        p.f.delete();
        p.f.push_back('{head: 1'b1, tail: (rh.mtype == MSG_WR_REQ), data: hdr2data(oh)});
        if (rh.mtype == MSG_WR_REQ) begin
          chk(inpkt.size() == int'(rh.len) + 3, "write packet length");
          for (int k = 0; k <= int'(rh.len); k++) chk(inpkt[2 + k].data == pat(raddr + 32'(4 * k)), "write data");
        end else
          for (int k = 0; k <= int'(rh.len); k++)
            p.f.push_back('{head: 1'b0, tail: (k == int'(rh.len)), data: pat(raddr + 32'(4 * k))});
        p.ready_at = now + longint'($urandom_range(4, 80));
        pool.push_back(p);
        if (pool.size() > 4 * N) begin
          chk(0, "far more request packets than requests");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
        inpkt.delete();
      end
    end
  end

  // returns responses one packet at a time, in random order
  initial begin
    int idx;
    fq_t f;
    resp_valid = 0; resp_flit = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      idx = -1;
      foreach (pool[i]) if (pool[i].ready_at <= now && (idx < 0 || $urandom_range(0, 1) == 1)) idx = i;
      if (idx >= 0) begin
        f = pool[idx].f;
        pool.delete(idx);
        foreach (f[i]) begin
          if (i > 0) @(negedge clk);
          resp_valid = 1; resp_flit = f[i];
          @(posedge clk);
          while (!resp_ready) @(posedge clk);
          #1 resp_valid = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_rd_done == N && n_wr_done == N);
    repeat (10) @(posedge clk);
    chk(size_aom == 0 && rb_used == 0, "reorder unit empty at the end");
    chk(n_refused > 0, "admittance refusal happened");
    chk(n_to_rb > 0, "out-of-order packet stored");
    chk(n_from_rb > 0, "stored packet released");
    n_direct = n_dlv - n_from_rb;
    chk(n_direct > 0, "in-order packet delivered directly");
    $display("finished at %0t", $time);
    $display("refusals %0d stored %0d released %0d direct %0d", n_refused, n_to_rb, n_from_rb, n_direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
