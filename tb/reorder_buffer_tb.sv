// reorder_buffer_tb: self-checking test of the reorder table and the linked
// reorder buffer. Each round picks a few transaction IDs, each with a short
// run of consecutive sequence numbers (wrapping past 7) and packets of 1..9
// flits. The first packet of every run is "delivered directly" by the test
// at a random moment (its expected number advances); all others are stored
// in shuffled order, flit by flit, with random gaps, while released packets
// are taken with random back-pressure. The test plays the status table:
// exp_seq of an ID advances when a released head is accepted. It checks that
// every released packet is the expected one of its ID, complete, with the
// same flits as stored, that nothing is released twice or lost, that
// storing never stalls, and that all slots are free after each round.
// The release rule under test follows the document's reorder table and
// buffer; the stimulus and model are this design's own.
`timescale 1ns/1ps
module reorder_buffer_tb;
  import noc_pkg::*;
  localparam int RB = 48, RTR = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  st_valid, st_ready, rel_valid, rel_ready;
  flit_t st_flit, rel_flit;
  logic [NUM_TID-1:0] exp_valid;
  logic [SEQ_W-1:0]   exp_seq [NUM_TID];
  logic [$clog2(RB+1)-1:0]  used_slots;
  logic [$clog2(RTR+1)-1:0] used_rows;

  reorder_buffer #(.RB_DEPTH(RB), .RT_ROWS(RTR)) dut (.*);

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

  typedef logic [31:0] words_t [$];
  words_t pkt [NUM_TID][8];           // flits of each stored packet
  bit     complete [NUM_TID][8];
  int     to_release;
  int     released;

  typedef struct { int t; int s; } ps_t;
  ps_t order [$];
  ps_t direct [$];

  int   tids [$];
  int   run_len [NUM_TID];
  int   max_used;
  int   total, t, base, s, n, guard;
  hdr_t hh;

  task automatic store_pkt(input int t, input int s);
    for (int i = 0; i < pkt[t][s].size(); i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin st_valid = 0; @(negedge clk); end
      st_valid     = 1;
      st_flit.head = (i == 0);
      st_flit.tail = (i == pkt[t][s].size() - 1);
      st_flit.data = pkt[t][s][i];
      #1 chk(st_ready, "store never stalls");
      @(posedge clk);
      if (st_flit.tail) complete[t][s] = 1;
      #1 st_valid = 0;
    end
  endtask

  // consumer of released packets
  int  cur_t, cur_s, cur_i;
  bit  in_pkt = 0;
  hdr_t h;
  always @(posedge clk) begin
    if (rst_n && rel_valid && rel_ready) begin
      if (!in_pkt) begin
        h = data2hdr(rel_flit.data);
        cur_t = int'(h.tid); cur_s = int'(h.seq); cur_i = 0;
        chk(rel_flit.head, "release starts with head");
        chk(exp_valid[cur_t] && exp_seq[cur_t] == h.seq, "released packet is the expected one");
        chk(complete[cur_t][cur_s], "only complete packets released");
        exp_seq[cur_t] <= exp_seq[cur_t] + 1'b1;
        in_pkt = 1;
      end
      chk(cur_i < pkt[cur_t][cur_s].size() && rel_flit.data == pkt[cur_t][cur_s][cur_i], "released flit data");
      chk(rel_flit.tail == (cur_i == pkt[cur_t][cur_s].size() - 1), "tail mark");
      cur_i++;
      if (rel_flit.tail) begin
        in_pkt = 0;
        complete[cur_t][cur_s] = 0;
        released++;
      end
    end
    if (int'(used_slots) > max_used) max_used = int'(used_slots);
  end
  always @(negedge clk) rel_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    st_valid = 0; st_flit = '0; exp_valid = '0; max_used = 0;
    foreach (exp_seq[i]) exp_seq[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 150; round++) begin
      total = 0;
      tids.delete(); order.delete(); direct.delete();
      // pick IDs and runs, at most 48 stored flits and 16 stored packets
      while (tids.size() < 4) begin
        t = $urandom_range(0, 15);
        if (!(t inside {tids})) tids.push_back(t);
      end
      foreach (tids[k]) begin
        t = tids[k];
        base = $urandom_range(0, 7);
        run_len[t] = $urandom_range(1, 4);
        @(negedge clk);
        exp_valid[t] = 1; exp_seq[t] = SEQ_W'(base);
        for (int j = 0; j < run_len[t]; j++) begin
          s = (base + j) % 8;
          n = $urandom_range(1, 9);
          if (j > 0 && total + n > RB) n = 1;
          pkt[t][s].delete();
          begin
            hh = '0;
            hh.tid = TID_W'(t); hh.seq = SEQ_W'(s); hh.mtype = MSG_RD_RESP; hh.len = LEN_W'(n - 1);
            pkt[t][s].push_back(hdr2data(hh));
          end
          for (int f = 1; f < n; f++) pkt[t][s].push_back($urandom);
          complete[t][s] = 0;
          if (j == 0) direct.push_back('{t, s});
          else begin order.push_back('{t, s}); total += n; end
        end
      end
      order.shuffle();
      to_release = order.size();
      released = 0;
      fork
        foreach (order[k]) store_pkt(order[k].t, order[k].s);
        foreach (direct[k]) begin
          repeat ($urandom_range(0, 30)) @(posedge clk);
          @(negedge clk);
          exp_seq[direct[k].t] = exp_seq[direct[k].t] + 1'b1;   // delivered without buffering
        end
      join
      begin
        guard = 0;
        while (released < to_release && guard < 2000) begin @(posedge clk); guard++; end
      end
      chk(released == to_release, "all stored packets released");
      repeat (3) @(posedge clk);
      chk(used_slots == 0 && used_rows == 0, "buffer empty after round");
      @(negedge clk);
      foreach (tids[k]) exp_valid[tids[k]] = 0;
    end
    chk(max_used > 30, "buffer filled high at least once");
    $display("max slots in use: %0d", max_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
