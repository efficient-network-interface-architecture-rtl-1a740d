// reorder_unit_tb: self-checking test of the whole reorder unit. Each round
// admits a few messages on several transaction IDs (checking the sequence
// numbers 0,1,2,... per ID and that a refusal only happens when the
// reserved space would pass the buffer size), builds their response packets
// and feeds them back in shuffled order. The test acts as packet queue and
// depacketizer: for each arriving packet it asks the unit whether it is in
// order (checked against its own bookkeeping), delivers it directly if so
// and stores it otherwise, and takes every packet the unit releases, one
// packet at a time, reporting deliveries. It checks that each ID receives
// its responses in sequence order with the stored contents, and that at the
// end of a round size_aom, the status register and the buffer are empty.
`timescale 1ns/1ps
module reorder_unit_tb;
  import noc_pkg::*;
  localparam int RB = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               adm_req, adm_grant, lk_inorder, st_valid, st_ready, rel_valid, rel_ready;
  logic               dlv_head, dlv_tail;
  logic [TID_W-1:0]   adm_tid, lk_tid, dlv_tid;
  logic [SIZE_W-1:0]  adm_size, dlv_size;
  logic [SEQ_W-1:0]   adm_seq, lk_seq;
  flit_t              st_flit, rel_flit;
  logic [NUM_TID-1:0] status_reg;
  logic [$clog2(RB+1)-1:0] size_aom, used_slots;

  reorder_unit #(.RB_DEPTH(RB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [31:0] words_t [$];
  typedef struct { int t; int s; } ps_t;
  words_t pkt [NUM_TID][8];
  ps_t    arrivals [$];
  int     nmsg [NUM_TID];
  int     next_exp [NUM_TID];
  int     reserved, n_stored, n_released, n_refused;
  int     t, n, sz, len, delivered, total;
  int     tids [$];
  hdr_t   hh;

  task automatic idle();
    adm_req = 0; st_valid = 0; dlv_head = 0; dlv_tail = 0; rel_ready = 0;
    adm_tid = 0; adm_size = 1; lk_tid = 0; lk_seq = 0; dlv_tid = 0; dlv_size = 1; st_flit = '0;
  endtask

  // deliver the flits of a packet to the "depacketizer", from either source
  task automatic deliver(input int tt, input int ss, input bit from_rb);
    chk(ss == next_exp[tt], $sformatf("tid %0d delivered seq %0d, expected %0d", tt, ss, next_exp[tt]));
    next_exp[tt] = (next_exp[tt] + 1) % 8;
    for (int i = 0; i < pkt[tt][ss].size(); i++) begin
      @(negedge clk); idle();
      if (from_rb) begin
        rel_ready = 1;
        #1 chk(rel_valid && rel_flit.data == pkt[tt][ss][i], "released flit");
        chk(rel_flit.tail == (i == pkt[tt][ss].size() - 1), "released tail");
      end
      dlv_head = (i == 0); dlv_tid = TID_W'(tt); dlv_size = SIZE_W'(pkt[tt][ss].size());
      dlv_tail = (i == pkt[tt][ss].size() - 1);
      @(posedge clk);
    end
    #1 idle();
    delivered++;
  endtask

  task automatic take_releases();
    while (1) begin
      @(negedge clk); idle();
      repeat (2) begin
        if (!rel_valid) @(negedge clk);
      end
      if (!rel_valid) break;
      hh = data2hdr(rel_flit.data);
      chk(rel_flit.head, "release starts with head");
      n_released++;
      deliver(int'(hh.tid), int'(hh.seq), 1);
    end
  endtask

  initial begin
    idle();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      tids.delete(); arrivals.delete(); delivered = 0; total = 0; reserved = 0;
      while (tids.size() < 3) begin
        t = $urandom_range(0, 15);
        if (!(t inside {tids})) tids.push_back(t);
      end
      foreach (tids[k]) begin
        t = tids[k]; nmsg[t] = 0; next_exp[t] = 0;
        n = $urandom_range(1, 5);
        for (int j = 0; j < n; j++) begin
          len = $urandom_range(0, 7);
          sz  = ($urandom_range(0, 1) == 1) ? len + 2 : 1;    // read or write response size
          @(negedge clk); idle();
          adm_req = 1; adm_tid = TID_W'(t); adm_size = SIZE_W'(sz);
          #1;
          if (j == 0) chk(adm_grant, "first message always admitted");
          else if (reserved + sz <= RB) chk(adm_grant, "admitted when space is free");
          else chk(!adm_grant, "refused when space is short");
          if (!adm_grant) begin n_refused++; @(posedge clk); #1 idle(); break; end
          chk(int'(adm_seq) == j, "sequence number");
          if (j > 0) reserved += sz;
          pkt[t][j].delete();
          hh = '0; hh.tid = TID_W'(t); hh.seq = SEQ_W'(j); hh.len = LEN_W'(len);
          hh.mtype = (sz == 1) ? MSG_WR_RESP : MSG_RD_RESP;
          pkt[t][j].push_back(hdr2data(hh));
          for (int f = 1; f < sz; f++) pkt[t][j].push_back($urandom);
          arrivals.push_back('{t, j});
          nmsg[t]++; total++;
          @(posedge clk); #1 idle();
        end
      end
      chk(int'(size_aom) == reserved, "size_aom after admittance");
      arrivals.shuffle();
      foreach (arrivals[k]) begin
        take_releases();
        @(negedge clk); idle();
        t = arrivals[k].t;
        lk_tid = TID_W'(t); lk_seq = SEQ_W'(arrivals[k].s);
        #1 chk(lk_inorder == (arrivals[k].s == next_exp[t]), "in-order decision");
        if (lk_inorder) deliver(t, arrivals[k].s, 0);
        else begin
          n_stored++;
          for (int i = 0; i < pkt[t][arrivals[k].s].size(); i++) begin
            @(negedge clk); idle();
            st_valid = 1; st_flit.data = pkt[t][arrivals[k].s][i];
            st_flit.head = (i == 0); st_flit.tail = (i == pkt[t][arrivals[k].s].size() - 1);
            #1 chk(st_ready, "store accepted");
            @(posedge clk);
          end
          #1 idle();
        end
      end
      take_releases();
      chk(delivered == total, "every response delivered");
      repeat (2) @(posedge clk);
      chk(size_aom == 0 && status_reg == 0 && used_slots == 0, "unit empty after round");
    end
    chk(n_stored > 50 && n_released == n_stored, "out-of-order packets stored and released");
    chk(n_refused > 0, "admittance refused at least once");
    $display("stored %0d released %0d refused %0d", n_stored, n_released, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
