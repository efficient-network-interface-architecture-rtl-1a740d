// status_table_tb: self-checking test of the status register/table and the
// admittance bookkeeping. A directed part replays the update sequence of
// the worked example (ID 2: first message seq 0, second seq 1 opening a row,
// third seq 2, in-order deliveries, row closed at N-T = 0), and checks
// that one ID can hold six burst-8 reads in a 48-slot buffer. A random part
// then runs admittance attempts, lookups and legal in-order deliveries
// against an independent reference model that keeps, per ID, the list of
// outstanding messages with their sequence number, size and whether space
// was reserved, and checks grant, sequence number, the in-order answer,
// E-S per ID and size_aom every cycle.
// The directed part follows the document's worked example of the status
// table; the reference model and random run are this design's own.
`timescale 1ns/1ps
module status_table_tb;
  import noc_pkg::*;
  localparam int RB = 48, STR = 8, RTR = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              adm_req, adm_grant, lk_inorder, dlv_head, dlv_tail;
  logic [TID_W-1:0]  adm_tid, lk_tid, dlv_tid;
  logic [SIZE_W-1:0] adm_size, dlv_size;
  logic [SEQ_W-1:0]  adm_seq, lk_seq;
  logic [NUM_TID-1:0] exp_valid, status_reg;
  logic [SEQ_W-1:0]  exp_seq [NUM_TID];
  logic [$clog2(RB+1)-1:0] size_aom;
  logic [$clog2(RTR+1)-1:0] resv_cnt;

  status_table #(.ST_ROWS(STR), .RB_DEPTH(RB), .RT_ROWS(RTR)) dut (.*);

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

  // ---------------- reference model ----------------
  typedef struct { int seq; int size; bit res; } ent_t;
  ent_t q [NUM_TID][$];
  bit   row [NUM_TID];
  int   m_aom, m_resv, pend_amt, pend_res;

  function automatic int rows_used();
    int n = 0;
    foreach (row[i]) n += row[i];
    return n;
  endfunction

  task automatic idle();
    adm_req = 0; dlv_head = 0; dlv_tail = 0;
    adm_tid = 0; adm_size = 1; lk_tid = 0; lk_seq = 0; dlv_tid = 0; dlv_size = 1;
  endtask

  // directed: one admittance in a cycle of its own
  task automatic adm(input int t, input int sz, input bit eg, input int es);
    @(negedge clk);
    idle(); adm_req = 1; adm_tid = TID_W'(t); adm_size = SIZE_W'(sz);
    #1;
    chk(adm_grant == eg, $sformatf("grant tid %0d", t));
    if (eg) chk(adm_seq == SEQ_W'(es), $sformatf("seq tid %0d got %0d exp %0d", t, adm_seq, es));
    @(posedge clk); #1 idle();
  endtask

  task automatic dlv(input int t, input int sz, input bit same_tail);
    @(negedge clk);
    idle(); dlv_head = 1; dlv_tid = TID_W'(t); dlv_size = SIZE_W'(sz); dlv_tail = same_tail;
    @(posedge clk); #1 idle();
    if (!same_tail) begin
      @(negedge clk); dlv_tail = 1;
      @(posedge clk); #1 idle();
    end
  endtask

  int cyc;
  int t, sz, k;
  bit e_grant; int e_seq; bit e_in;
  bit pending; ent_t e; bit r;

  initial begin
    idle();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- directed replay of the status-table example (ID 2) ----
    adm(2, 9, 1, 0);                       // first message: status bit only
    chk(status_reg[2] && !exp_valid[2] && size_aom == 0, "first message sets bit only");
    adm(2, 9, 1, 1);                       // second: row opened, seq = 1+0
    chk(exp_valid[2] && exp_seq[2] == 0 && size_aom == 9, "row opened, size_aom += 9");
    adm(2, 1, 1, 2);                       // third: seq = 2+0
    chk(size_aom == 10, "size_aom += 1");
    @(negedge clk); lk_tid = 2; lk_seq = 1; #1 chk(!lk_inorder, "seq 1 out of order");
    lk_seq = 0; #1 chk(lk_inorder, "seq 0 in order");
    lk_tid = 5; lk_seq = 3; #1 chk(lk_inorder, "ID without row in order");
    dlv(2, 9, 0);                          // seq 0 (reserved nothing)
    chk(exp_seq[2] == 1 && size_aom == 10, "E-S+1, nothing returned");
    @(negedge clk); dlv_head = 1; dlv_tid = 2; dlv_size = 9;
    @(posedge clk); #1 idle();
    chk(size_aom == 10, "space held until tail");
    @(negedge clk); dlv_tail = 1; @(posedge clk); #1 idle();
    chk(size_aom == 1, "space returned at tail");
    dlv(2, 1, 1);
    chk(!exp_valid[2] && !status_reg[2] && size_aom == 0, "row and bit cleared at N-T=0");
    adm(3, 2, 1, 0);
    dlv(3, 2, 1);
    chk(!status_reg[3], "single message clears bit");
    // admittance refused when the buffer would overflow
    for (int i = 0; i < 6; i++) adm(i, 9, 1, 0);
    for (int i = 0; i < 5; i++) adm(i, 9, 1, 1);
    adm(5, 9, 0, 0);                        // 45 + 9 > 48
    adm(5, 3, 1, 1);                        // 45 + 3 = 48
    chk(size_aom == 48, "buffer fully reserved");
    adm(0, 1, 0, 0);
    // no admittance while a delivery commits
    @(negedge clk); idle(); adm_req = 1; adm_tid = 9; adm_size = 1; dlv_head = 1; dlv_tid = 0; dlv_size = 9; dlv_tail = 1;
    #1 chk(!adm_grant, "admittance held in a delivery cycle");
    @(negedge clk); idle();
    rst_n = 0; @(posedge clk); @(posedge clk); #1 rst_n = 1;
    // six outstanding burst-8 reads (9 slots each) of one ID fit 48 slots:
    // the first reserves nothing, the other five reserve 45; a seventh waits
    for (int i = 0; i < 6; i++) adm(7, 9, 1, i);
    chk(size_aom == 45, "five burst-8 responses reserved");
    adm(7, 9, 0, 0);
    rst_n = 0; @(posedge clk); @(posedge clk); #1 rst_n = 1;

    // ---- random run against the reference model ----
    m_aom = 0; m_resv = 0; pending = 0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      idle();
      // delivery of the oldest outstanding message of some ID
      if (pending) begin
        if ($urandom_range(0, 1) == 1) dlv_tail = 1;
      end else if ($urandom_range(0, 2) == 0) begin
        k = $urandom_range(0, 15);
        for (int j = 0; j < NUM_TID; j++) begin
          t = (k + j) % NUM_TID;
          if (q[t].size() > 0) begin
            dlv_head = 1; dlv_tid = TID_W'(t); dlv_size = SIZE_W'(q[t][0].size);
            dlv_tail = $urandom_range(0, 1);
            break;
          end
        end
      end
      // admittance attempt
      if ($urandom_range(0, 1) == 1) begin
        adm_req = 1; adm_tid = TID_W'($urandom_range(0, 9)); adm_size = SIZE_W'($urandom_range(1, 9));
      end
      // lookup of an outstanding message or of an idle ID
      lk_tid = TID_W'($urandom_range(0, 15));
      if (q[lk_tid].size() > 0) lk_seq = SEQ_W'(q[lk_tid][$urandom_range(0, q[lk_tid].size()-1)].seq);
      else lk_seq = SEQ_W'($urandom_range(0, 7));
      #1;
      // expected answers
      t = int'(adm_tid); sz = int'(adm_size);
      e_grant = 0; e_seq = 0;
      if (adm_req && !dlv_head) begin
        if (q[t].size() == 0) begin e_grant = 1; e_seq = 0; end
        else begin
          e_seq = (q[t][$].seq + 1) % 8;
          e_grant = (m_aom + sz <= RB) && (m_resv < RTR) && (q[t].size() < 8) &&
                    (row[t] || rows_used() < STR);
        end
      end
      e_in = (q[lk_tid].size() == 0) || (q[lk_tid][0].seq == int'(lk_seq));
      chk(adm_grant == e_grant, $sformatf("random grant tid %0d", t));
      if (e_grant) chk(int'(adm_seq) == e_seq, "random seq");
      chk(lk_inorder == e_in, "random in-order");
      for (int i = 0; i < NUM_TID; i++)
        if (row[i]) chk(exp_valid[i] && int'(exp_seq[i]) == q[i][0].seq, "E-S per ID");
      chk(int'(size_aom) == m_aom, $sformatf("size_aom %0d exp %0d", size_aom, m_aom));
      // model update at the clock edge
      @(posedge clk);
      if (dlv_head) begin
        e = q[dlv_tid].pop_front();
        if (q[dlv_tid].size() == 0) row[dlv_tid] = 0;
        pend_amt = e.res ? e.size : 0; pend_res = int'(e.res);
        pending = 1;
      end
      if (dlv_tail) begin
        m_aom -= pend_amt; m_resv -= pend_res; pending = 0;
      end
      if (e_grant) begin
        r = (q[t].size() > 0);
        if (r) begin row[t] = 1; m_aom += sz; m_resv++; end
        q[t].push_back('{e_seq, sz, r});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
