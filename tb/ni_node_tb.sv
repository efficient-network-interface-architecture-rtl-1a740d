// ni_node_tb: end-to-end test of one network node (master NI and slave NI)
// at its default sizes. The node sits at mesh position (0,0); three more
// slave NIs with behavioural memories sit at nodes 1, 7 and 13, and the
// node's own slave NI has one too. A behavioural network carries request
// packets from the master NI to the slave NI its destination names, after a
// random delay, and brings every response packet back after another random
// delay, choosing among waiting responses at random, so responses of one
// transaction ID overtake each other. A random master core issues reads and
// writes of 1..8 beats on four IDs to all four memories; write data and
// read data follow an address pattern the memories know.
// Checks: per ID, read data and write responses come back in issue order
// with correct data, last and resp; every memory saw intact write data;
// the reorder unit is empty at the end. Mechanism counts (each must happen):
// admittance refused, out-of-order packet parked, parked packet released,
// in-order packet delivered directly, reads and writes at every slave
// including the node's own, every burst length 1..8.
`timescale 1ns/1ps
module ni_node_tb;
  import noc_pkg::*;

  localparam int NS = 4;                        // slaves: own node + 3
  localparam int SLV_NODE [NS] = '{0, 1, 7, 13};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // master core side
  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_ar_valid, m_ar_ready;
  logic m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  axi_a_t m_aw, m_ar;
  axi_w_t m_w;
  axi_r_t m_r;
  axi_b_t m_b;
  logic m_req_valid, m_req_ready, m_resp_valid, m_resp_ready;
  flit_t m_req_flit, m_resp_flit;
  logic adm_attempt, adm_refused, pkt_to_rb, pkt_from_rb, map_err;
  logic [5:0] size_aom, rb_used;

  // per slave: router links and AXI to its memory
  logic   s_req_valid [NS], s_req_ready [NS], s_resp_valid [NS], s_resp_ready [NS];
  flit_t  s_req_flit [NS], s_resp_flit [NS];
  logic   aw_valid [NS], aw_ready [NS], w_valid [NS], w_ready [NS], ar_valid [NS], ar_ready [NS];
  logic   r_valid [NS], r_ready [NS], b_valid [NS], b_ready [NS];
  axi_a_t aw [NS], ar [NS];
  axi_w_t w [NS];
  axi_r_t r [NS];
  axi_b_t b [NS];
  int     mem_err [NS], mem_rd [NS], mem_wr [NS];

  ni_node dut (
    .clk, .rst_n,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w, .m_ar_valid, .m_ar_ready, .m_ar,
    .m_r_valid, .m_r_ready, .m_r, .m_b_valid, .m_b_ready, .m_b,
    .m_req_valid, .m_req_ready, .m_req_flit, .m_resp_valid, .m_resp_ready, .m_resp_flit,
    .s_req_valid(s_req_valid[0]), .s_req_ready(s_req_ready[0]), .s_req_flit(s_req_flit[0]),
    .s_resp_valid(s_resp_valid[0]), .s_resp_ready(s_resp_ready[0]), .s_resp_flit(s_resp_flit[0]),
    .s_aw_valid(aw_valid[0]), .s_aw_ready(aw_ready[0]), .s_aw(aw[0]),
    .s_w_valid(w_valid[0]), .s_w_ready(w_ready[0]), .s_w(w[0]),
    .s_ar_valid(ar_valid[0]), .s_ar_ready(ar_ready[0]), .s_ar(ar[0]),
    .s_r_valid(r_valid[0]), .s_r_ready(r_ready[0]), .s_r(r[0]),
    .s_b_valid(b_valid[0]), .s_b_ready(b_ready[0]), .s_b(b[0]),
    .adm_attempt, .adm_refused, .pkt_to_rb, .pkt_from_rb, .map_err, .size_aom, .rb_used);

  for (genvar s = 1; s < NS; s++) begin : g_slv
    slave_ni u_sni (
      .clk, .rst_n, .node_x(COORD_W'(SLV_NODE[s] % 5)), .node_y(COORD_W'(SLV_NODE[s] / 5)),
      .req_valid(s_req_valid[s]), .req_ready(s_req_ready[s]), .req_flit(s_req_flit[s]),
      .resp_valid(s_resp_valid[s]), .resp_ready(s_resp_ready[s]), .resp_flit(s_resp_flit[s]),
      .aw_valid(aw_valid[s]), .aw_ready(aw_ready[s]), .aw(aw[s]),
      .w_valid(w_valid[s]), .w_ready(w_ready[s]), .w(w[s]),
      .ar_valid(ar_valid[s]), .ar_ready(ar_ready[s]), .ar(ar[s]),
      .r_valid(r_valid[s]), .r_ready(r_ready[s]), .r(r[s]),
      .b_valid(b_valid[s]), .b_ready(b_ready[s]), .b(b[s]));
  end
  for (genvar s = 0; s < NS; s++) begin : g_mem
    axi_mem_model #(.MAX_DELAY(2 + 6 * s), .SEED(11 + s)) u_mem (
      .clk, .rst_n, .aw_valid(aw_valid[s]), .aw_ready(aw_ready[s]), .aw(aw[s]),
      .w_valid(w_valid[s]), .w_ready(w_ready[s]), .w(w[s]),
      .ar_valid(ar_valid[s]), .ar_ready(ar_ready[s]), .ar(ar[s]),
      .r_valid(r_valid[s]), .r_ready(r_ready[s]), .r(r[s]),
      .b_valid(b_valid[s]), .b_ready(b_ready[s]), .b(b[s]),
      .errors(mem_err[s]), .n_reads(mem_rd[s]), .n_writes(mem_wr[s]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int N = 400;            // reads and writes each
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] rand_addr();
    int s = $urandom_range(0, NS - 1);
    return {5'(SLV_NODE[s]), 27'($urandom)} & 32'hFFFF_FFFC;
  endfunction

  axi_a_t rd_q [NUM_TID][$], wr_q [NUM_TID][$];
  int n_rd_done = 0, n_wr_done = 0, n_refused = 0, n_to_rb = 0, n_from_rb = 0, n_dlv = 0;
  int len_seen [8];

  // ---------------- master core ----------------
  initial begin
    m_aw_valid = 0; m_aw = '0; m_w_valid = 0; m_w = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      m_aw_valid = 1;
      m_aw = '{id: TID_W'($urandom_range(0, 3)), addr: rand_addr(), len: LEN_W'($urandom)};
      @(posedge clk);
      while (!m_aw_ready) @(posedge clk);
      wr_q[m_aw.id].push_back(m_aw);
      #1 m_aw_valid = 0;
      for (int k = 0; k <= int'(m_aw.len); k++) begin
        @(negedge clk);
        m_w_valid = 1; m_w = '{data: pat(m_aw.addr + 32'(4 * k)), last: (k == int'(m_aw.len))};
        @(posedge clk);
        while (!m_w_ready) @(posedge clk);
        #1 m_w_valid = 0;
      end
    end
  end
  initial begin
    m_ar_valid = 0; m_ar = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      m_ar_valid = 1;
      m_ar = '{id: TID_W'($urandom_range(0, 3)), addr: rand_addr(), len: LEN_W'($urandom)};
      @(posedge clk);
      while (!m_ar_ready) @(posedge clk);
      rd_q[m_ar.id].push_back(m_ar);
      len_seen[m_ar.len]++;
      #1 m_ar_valid = 0;
    end
  end
  always @(negedge clk) begin
    m_r_ready <= ($urandom_range(0, 4) != 0);
    m_b_ready <= ($urandom_range(0, 4) != 0);
  end

  // ---------------- checker ----------------
  int rbeat = 0;
  axi_a_t cur;
  always @(posedge clk) if (rst_n) begin
    if (m_r_valid && m_r_ready) begin
      cur = rd_q[m_r.id][0];
      chk(m_r.data == pat(cur.addr + 32'(4 * rbeat)), "read data in issue order");
      chk(m_r.resp == {1'b0, cur.addr[2]}, "read resp");
      chk(m_r.last == (rbeat == int'(cur.len)), "read last");
      if (m_r.last) begin void'(rd_q[m_r.id].pop_front()); rbeat = 0; n_rd_done++; n_dlv++; end
      else rbeat++;
    end
    if (m_b_valid && m_b_ready) begin
      cur = wr_q[m_b.id].pop_front();
      chk(m_b.resp == {1'b0, cur.addr[2]}, "write response in issue order");
      n_wr_done++; n_dlv++;
    end
    if (adm_refused) n_refused++;
    if (pkt_to_rb) n_to_rb++;
    if (pkt_from_rb) n_from_rb++;
    chk(!map_err, "no mapping error");
  end

  // ---------------- network ----------------
  typedef flit_t fq_t [$];
  typedef struct { fq_t f; longint ready_at; } rp_t;
  rp_t    to_slv [NS][$];
  rp_t    to_mst [$];
  fq_t    mpkt, spkt [NS];
  longint now = 0;
  hdr_t   h;
  int     dst;

  always @(negedge clk) begin
    m_req_ready <= ($urandom_range(0, 4) != 0);
    for (int s = 0; s < NS; s++) s_resp_ready[s] <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    rp_t p;
    now++;
    if (m_req_valid && m_req_ready) begin
      mpkt.push_back(m_req_flit);
      if (m_req_flit.tail) begin
        h = data2hdr(mpkt[0].data);
        dst = -1;
        for (int s = 0; s < NS; s++)
          if (int'(h.dst_x) + 5 * int'(h.dst_y) == SLV_NODE[s]) dst = s;
        chk(dst >= 0, "request routed to a slave node");
        if (dst >= 0) begin
          p.f = mpkt;
          p.ready_at = now + longint'($urandom_range(3, 25));
          to_slv[dst].push_back(p);
        end
        mpkt.delete();
      end
    end
    for (int s = 0; s < NS; s++)
      if (s_resp_valid[s] && s_resp_ready[s]) begin
        spkt[s].push_back(s_resp_flit[s]);
        if (s_resp_flit[s].tail) begin
          h = data2hdr(spkt[s][0].data);
          chk(h.dst_x == 0 && h.dst_y == 0 && int'(h.src_x) + 5 * int'(h.src_y) == SLV_NODE[s], "response addressed back");
          p.f = spkt[s];
          p.ready_at = now + longint'($urandom_range(3, 60));
          to_mst.push_back(p);
          spkt[s].delete();
        end
      end
    if (to_mst.size() > 4 * N) begin
      chk(0, "runaway traffic");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // deliver requests to each slave in order of arrival
  for (genvar s = 0; s < NS; s++) begin : g_deliver
    initial begin
      fq_t f;
      s_req_valid[s] = 0; s_req_flit[s] = '0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (to_slv[s].size() > 0 && to_slv[s][0].ready_at <= now) begin
          f = to_slv[s][0].f;
          void'(to_slv[s].pop_front());
          foreach (f[i]) begin
            if (i > 0) @(negedge clk);
            s_req_valid[s] = 1; s_req_flit[s] = f[i];
            @(posedge clk);
            while (!s_req_ready[s]) @(posedge clk);
            #1 s_req_valid[s] = 0;
          end
        end
      end
    end
  end

  // return responses to the master in random order
  initial begin
    int idx;
    fq_t f;
    m_resp_valid = 0; m_resp_flit = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      idx = -1;
      foreach (to_mst[i]) if (to_mst[i].ready_at <= now && (idx < 0 || $urandom_range(0, 1) == 1)) idx = i;
      if (idx >= 0) begin
        f = to_mst[idx].f;
        to_mst.delete(idx);
        foreach (f[i]) begin
          if (i > 0) @(negedge clk);
          m_resp_valid = 1; m_resp_flit = f[i];
          @(posedge clk);
          while (!m_resp_ready) @(posedge clk);
          #1 m_resp_valid = 0;
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
    for (int s = 0; s < NS; s++) begin
      chk(mem_err[s] == 0, $sformatf("memory %0d saw intact write data", s));
      chk(mem_rd[s] > 0 && mem_wr[s] > 0, $sformatf("memory %0d served reads and writes", s));
    end
    for (int l = 0; l < 8; l++) chk(len_seen[l] > 0, "every burst length used");
    chk(n_refused > 0, "admittance refusal happened");
    chk(n_to_rb > 0, "out-of-order packet parked in the reorder buffer");
    chk(n_from_rb > 0, "parked packet released");
    chk(n_dlv - n_from_rb > 0, "in-order packet delivered directly");
    $display("finished at %0t", $time);
    $display("refusals %0d parked %0d released %0d direct %0d; memory reads/writes %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             n_refused, n_to_rb, n_from_rb, n_dlv - n_from_rb,
             mem_rd[0], mem_wr[0], mem_rd[1], mem_wr[1], mem_rd[2], mem_wr[2], mem_rd[3], mem_wr[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
