// noc_uniform_tb: both evaluated system configurations of a 5x5 mesh under
// uniform random traffic, built from 25 network nodes (ni_node) at their
// default sizes. The routers are not part of this RTL, so a behavioural
// mesh stands in for them: a packet from node s to node d becomes visible at
// d after 3 cycles per XY hop plus one per flit plus 0..7 cycles of jitter,
// and each node's input link takes one packet at a time. Request packets
// reach a slave NI in arrival order; response packets waiting at a master
// NI are taken in random order, which is what makes the reorder unit work.
//   Phase A: ten nodes (0..9) run processors and fifteen (10..24) memories;
//            the master NIs of the memory nodes and the slave NIs of the
//            processor nodes stay idle.
//   Phase B: every node runs a processor and a memory.
// Each processor issues reads and writes to a memory picked uniformly among
// the active ones, burst length 1..8 picked uniformly, transaction IDs 0..7.
// Checks per processor and ID: read data, resp and last, and write
// responses, in issue order; memories see intact write data; reorder units
// empty at the end. Reported per phase: average latency from first request
// attempt to the last response beat, and the share of admittance attempts
// that were granted. Mechanisms that must happen: refusal, parking,
// release, direct delivery.
// The two configurations, the uniform traffic and the burst lengths follow
// the document's evaluation; the mesh timing model, which nodes are
// processors in phase A and the transaction counts are this design's own.
`timescale 1ns/1ps
module noc_uniform_tb;
  import noc_pkg::*;

  localparam int NN = 25;
  localparam int NA = 120;              // transactions per processor, phase A
  localparam int NB = 60;               // transactions per processor, phase B

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   m_aw_valid [NN], m_aw_ready [NN], m_w_valid [NN], m_w_ready [NN], m_ar_valid [NN], m_ar_ready [NN];
  logic   m_r_valid [NN], m_r_ready [NN], m_b_valid [NN], m_b_ready [NN];
  axi_a_t m_aw [NN], m_ar [NN];
  axi_w_t m_w [NN];
  axi_r_t m_r [NN];
  axi_b_t m_b [NN];
  logic   m_req_valid [NN], m_req_ready [NN], m_resp_valid [NN], m_resp_ready [NN];
  flit_t  m_req_flit [NN], m_resp_flit [NN];
  logic   s_req_valid [NN], s_req_ready [NN], s_resp_valid [NN], s_resp_ready [NN];
  flit_t  s_req_flit [NN], s_resp_flit [NN];
  logic   aw_valid [NN], aw_ready [NN], w_valid [NN], w_ready [NN], ar_valid [NN], ar_ready [NN];
  logic   r_valid [NN], r_ready [NN], b_valid [NN], b_ready [NN];
  axi_a_t aw [NN], ar [NN];
  axi_w_t w [NN];
  axi_r_t r [NN];
  axi_b_t b [NN];
  logic   adm_attempt [NN], adm_refused [NN], pkt_to_rb [NN], pkt_from_rb [NN], map_err [NN];
  logic [5:0] size_aom [NN], rb_used [NN];
  int     mem_err [NN], mem_rd [NN], mem_wr [NN];

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

  int  phase = 0;                       // 0 idle, 1 = A, 2 = B
  int  started [NN] = '{default: 0}, finished [NN] = '{default: 0};  // per phase
  int  budget [NN] = '{default: 0};     // transactions a processor has left
  longint lat_sum [3] = '{default: 0}, lat_cnt [3] = '{default: 0};
  longint att [3] = '{default: 0}, refused [3] = '{default: 0};
  int  n_to_rb = 0, n_from_rb = 0, n_dlv = 0;
  longint now = 0;

  function automatic bit is_master(int n);
    return phase == 2 || (phase == 1 && n < 10);
  endfunction
  function automatic logic [31:0] rand_addr();
    int d = (phase == 1) ? $urandom_range(10, 24) : $urandom_range(0, 24);
    return {5'(d), 27'($urandom)} & 32'hFFFF_FFFC;
  endfunction

  typedef struct { axi_a_t a; longint t0; } tr_t;

  for (genvar n = 0; n < NN; n++) begin : g_node
    ni_node #(.NODE_X(n % 5), .NODE_Y(n / 5)) u_node (
      .clk, .rst_n,
      .m_aw_valid(m_aw_valid[n]), .m_aw_ready(m_aw_ready[n]), .m_aw(m_aw[n]),
      .m_w_valid(m_w_valid[n]), .m_w_ready(m_w_ready[n]), .m_w(m_w[n]),
      .m_ar_valid(m_ar_valid[n]), .m_ar_ready(m_ar_ready[n]), .m_ar(m_ar[n]),
      .m_r_valid(m_r_valid[n]), .m_r_ready(m_r_ready[n]), .m_r(m_r[n]),
      .m_b_valid(m_b_valid[n]), .m_b_ready(m_b_ready[n]), .m_b(m_b[n]),
      .m_req_valid(m_req_valid[n]), .m_req_ready(m_req_ready[n]), .m_req_flit(m_req_flit[n]),
      .m_resp_valid(m_resp_valid[n]), .m_resp_ready(m_resp_ready[n]), .m_resp_flit(m_resp_flit[n]),
      .s_req_valid(s_req_valid[n]), .s_req_ready(s_req_ready[n]), .s_req_flit(s_req_flit[n]),
      .s_resp_valid(s_resp_valid[n]), .s_resp_ready(s_resp_ready[n]), .s_resp_flit(s_resp_flit[n]),
      .s_aw_valid(aw_valid[n]), .s_aw_ready(aw_ready[n]), .s_aw(aw[n]),
      .s_w_valid(w_valid[n]), .s_w_ready(w_ready[n]), .s_w(w[n]),
      .s_ar_valid(ar_valid[n]), .s_ar_ready(ar_ready[n]), .s_ar(ar[n]),
      .s_r_valid(r_valid[n]), .s_r_ready(r_ready[n]), .s_r(r[n]),
      .s_b_valid(b_valid[n]), .s_b_ready(b_ready[n]), .s_b(b[n]),
      .adm_attempt(adm_attempt[n]), .adm_refused(adm_refused[n]), .pkt_to_rb(pkt_to_rb[n]),
      .pkt_from_rb(pkt_from_rb[n]), .map_err(map_err[n]), .size_aom(size_aom[n]), .rb_used(rb_used[n]));

    axi_mem_model #(.MAX_DELAY(4), .SEED(100 + n)) u_mem (
      .clk, .rst_n, .aw_valid(aw_valid[n]), .aw_ready(aw_ready[n]), .aw(aw[n]),
      .w_valid(w_valid[n]), .w_ready(w_ready[n]), .w(w[n]),
      .ar_valid(ar_valid[n]), .ar_ready(ar_ready[n]), .ar(ar[n]),
      .r_valid(r_valid[n]), .r_ready(r_ready[n]), .r(r[n]),
      .b_valid(b_valid[n]), .b_ready(b_ready[n]), .b(b[n]),
      .errors(mem_err[n]), .n_reads(mem_rd[n]), .n_writes(mem_wr[n]));

    // processor: one write process and one read process share the budget
    tr_t rd_q [8][$], wr_q [8][$];
    tr_t t;
    int  rbeat = 0;
    tr_t cur;

    initial begin
      m_aw_valid[n] = 0; m_aw[n] = '0; m_w_valid[n] = 0; m_w[n] = '0;
      m_ar_valid[n] = 0; m_ar[n] = '0;
      forever begin
        @(negedge clk);
        if (is_master(n) && budget[n] > 0 && $urandom_range(0, 3) == 0) begin
          budget[n]--;
          started[n]++;
          t.a = '{id: TID_W'($urandom_range(0, 7)), addr: rand_addr(), len: LEN_W'($urandom)};
          t.t0 = now;
          if ($urandom_range(0, 1) == 1) begin
            m_aw_valid[n] = 1; m_aw[n] = t.a;
            @(posedge clk);
            while (!m_aw_ready[n]) @(posedge clk);
            wr_q[t.a.id[2:0]].push_back(t);
            #1 m_aw_valid[n] = 0;
            for (int k = 0; k <= int'(t.a.len); k++) begin
              @(negedge clk);
              m_w_valid[n] = 1; m_w[n] = '{data: pat(t.a.addr + 32'(4 * k)), last: (k == int'(t.a.len))};
              @(posedge clk);
              while (!m_w_ready[n]) @(posedge clk);
              #1 m_w_valid[n] = 0;
            end
          end else begin
            m_ar_valid[n] = 1; m_ar[n] = t.a;
            @(posedge clk);
            while (!m_ar_ready[n]) @(posedge clk);
            rd_q[t.a.id[2:0]].push_back(t);
            #1 m_ar_valid[n] = 0;
          end
        end
      end
    end
    always @(negedge clk) begin
      m_r_ready[n] <= ($urandom_range(0, 7) != 0);
      m_b_ready[n] <= ($urandom_range(0, 7) != 0);
    end
    always @(posedge clk) if (rst_n) begin
      if (m_r_valid[n] && m_r_ready[n]) begin
        cur = rd_q[m_r[n].id[2:0]][0];
        chk(rd_q[m_r[n].id[2:0]].size() > 0, "read response expected");
        chk(m_r[n].data == pat(cur.a.addr + 32'(4 * rbeat)), "read data in issue order");
        chk(m_r[n].resp == {1'b0, cur.a.addr[2]}, "read resp");
        chk(m_r[n].last == (rbeat == int'(cur.a.len)), "read last");
        if (m_r[n].last) begin
          void'(rd_q[m_r[n].id[2:0]].pop_front()); rbeat = 0; finished[n]++;
          lat_sum[phase] += now - cur.t0; lat_cnt[phase]++; n_dlv++;
        end else rbeat++;
      end
      if (m_b_valid[n] && m_b_ready[n]) begin
        chk(wr_q[m_b[n].id[2:0]].size() > 0, "write response expected");
        cur = wr_q[m_b[n].id[2:0]].pop_front();
        chk(m_b[n].resp == {1'b0, cur.a.addr[2]}, "write response in issue order");
        finished[n]++; lat_sum[phase] += now - cur.t0; lat_cnt[phase]++; n_dlv++;
      end
      if (adm_attempt[n]) att[phase]++;
      if (adm_refused[n]) refused[phase]++;
      if (pkt_to_rb[n]) n_to_rb++;
      if (pkt_from_rb[n]) n_from_rb++;
      chk(!map_err[n], "no mapping error");
    end
  end

  // ---------------- behavioural mesh ----------------
  typedef flit_t fq_t [$];
  typedef struct { fq_t f; longint ready_at; } rp_t;
  rp_t to_slv [NN][$];
  rp_t to_mst [NN][$];
  fq_t mpkt [NN], spkt [NN];

  function automatic int delay(int s, int d, int flits);
    int dx = (s % 5 > d % 5) ? s % 5 - d % 5 : d % 5 - s % 5;
    int dy = (s / 5 > d / 5) ? s / 5 - d / 5 : d / 5 - s / 5;
    return 3 * (dx + dy) + flits + int'($urandom_range(0, 7));
  endfunction

  always @(negedge clk)
    for (int n = 0; n < NN; n++) begin
      m_req_ready[n]  <= ($urandom_range(0, 7) != 0);
      s_resp_ready[n] <= ($urandom_range(0, 7) != 0);
    end

  always @(posedge clk) if (rst_n) begin
    hdr_t h;
    rp_t  p;
    int   d;
    now++;
    for (int n = 0; n < NN; n++) begin
      if (m_req_valid[n] && m_req_ready[n]) begin
        mpkt[n].push_back(m_req_flit[n]);
        if (m_req_flit[n].tail) begin
          h = data2hdr(mpkt[n][0].data);
          d = int'(h.dst_x) + 5 * int'(h.dst_y);
          chk(int'(h.src_x) + 5 * int'(h.src_y) == n && d < NN, "request header");
          p.f = mpkt[n];
          p.ready_at = now + longint'(delay(n, d, mpkt[n].size()));
          if (d < NN) to_slv[d].push_back(p);
          mpkt[n].delete();
        end
      end
      if (s_resp_valid[n] && s_resp_ready[n]) begin
        spkt[n].push_back(s_resp_flit[n]);
        if (s_resp_flit[n].tail) begin
          h = data2hdr(spkt[n][0].data);
          d = int'(h.dst_x) + 5 * int'(h.dst_y);
          chk(int'(h.src_x) + 5 * int'(h.src_y) == n && d < NN, "response header");
          p.f = spkt[n];
          p.ready_at = now + longint'(delay(n, d, spkt[n].size()));
          if (d < NN) to_mst[d].push_back(p);
          spkt[n].delete();
        end
      end
    end
  end

  for (genvar n = 0; n < NN; n++) begin : g_link
    fq_t f;
    int  idx;
    initial begin
      s_req_valid[n] = 0; s_req_flit[n] = '0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        idx = -1;
        foreach (to_slv[n][i]) if (idx < 0 && to_slv[n][i].ready_at <= now) idx = i;
        if (idx >= 0) begin
          f = to_slv[n][idx].f;
          to_slv[n].delete(idx);
          foreach (f[i]) begin
            if (i > 0) @(negedge clk);
            s_req_valid[n] = 1; s_req_flit[n] = f[i];
            @(posedge clk);
            while (!s_req_ready[n]) @(posedge clk);
            #1 s_req_valid[n] = 0;
          end
        end
      end
    end
    fq_t g;
    int  jdx;
    initial begin
      m_resp_valid[n] = 0; m_resp_flit[n] = '0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        jdx = -1;
        foreach (to_mst[n][i]) if (to_mst[n][i].ready_at <= now && (jdx < 0 || $urandom_range(0, 1) == 1)) jdx = i;
        if (jdx >= 0) begin
          g = to_mst[n][jdx].f;
          to_mst[n].delete(jdx);
          foreach (g[i]) begin
            if (i > 0) @(negedge clk);
            m_resp_valid[n] = 1; m_resp_flit[n] = g[i];
            @(posedge clk);
            while (!m_resp_ready[n]) @(posedge clk);
            #1 m_resp_valid[n] = 0;
          end
        end
      end
    end
  end

  function automatic bit all_done();
    for (int n = 0; n < NN; n++)
      if (budget[n] > 0 || started[n] != finished[n]) return 0;
    return 1;
  endfunction

  task automatic run_phase(int ph, int per_master);
    phase = ph;
    for (int n = 0; n < NN; n++) begin
      started[n] = 0; finished[n] = 0;
    end
    for (int n = 0; n < NN; n++) budget[n] = is_master(n) ? per_master : 0;
    while (!all_done()) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int n = 0; n < NN; n++)
      chk(size_aom[n] == 0 && rb_used[n] == 0, "reorder unit empty after the phase");
    $display("configuration %s: %0d transactions, average latency %0d cycles, admittance granted %0d of %0d attempts",
             ph == 1 ? "A, 10 processors and 15 memories" : "B, 25 processor+memory nodes",
             lat_cnt[ph], lat_sum[ph] / (lat_cnt[ph] > 0 ? lat_cnt[ph] : 1), att[ph] - refused[ph], att[ph]);
    phase = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    run_phase(1, NA);
    run_phase(2, NB);
    for (int n = 0; n < NN; n++) chk(mem_err[n] == 0, "memory saw intact write data");
    chk(n_to_rb > 0, "out-of-order packet parked");
    chk(n_from_rb > 0, "parked packet released");
    chk(n_dlv - n_from_rb > 0, "in-order delivery");
    chk(refused[1] + refused[2] > 0, "admittance refusal happened");
    $display("parked %0d released %0d direct %0d, finished at %0t", n_to_rb, n_from_rb, n_dlv - n_from_rb, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
