// axi_queue_m_tb: self-checking test of the master-side AXI queue. Random
// AXI write bursts (AW plus W beats) and read requests are offered with
// random valid timing. The test plays the reorder unit: it grants about two
// thirds of the admittance attempts at random and hands out sequence numbers
// per ID. It checks the response size asked for (write 1, read len+2), that
// granted requests reach the packetizer side in grant order with their
// fields and sequence number, that writes and reads each keep their AXI
// order, that write data comes out beat for beat in order, and that
// attempts alternate between write and read whenever both wait.
// The stimulus and checks are this design's own; the expected behaviour
// (admit before forwarding, sequence number with the message) follows the
// document's description of the AXI queue.
`timescale 1ns/1ps
module axi_queue_m_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic aw_valid, aw_ready, w_valid, w_ready, ar_valid, ar_ready;
  axi_a_t aw, ar;
  axi_w_t w, wd;
  logic adm_req, adm_is_wr, adm_grant, msg_valid, msg_ready, wd_valid, wd_ready;
  logic [TID_W-1:0] adm_tid;
  logic [SIZE_W-1:0] adm_size;
  logic [SEQ_W-1:0] adm_seq;
  req_msg_t msg;

  axi_queue_m dut (.*);

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

  localparam int N = 400;
  axi_a_t   awq [$], arq [$];
  logic [31:0] wdq [$];
  req_msg_t granted [$];
  int seqc [NUM_TID];
  int n_msg = 0, n_wd = 0, alt_checks = 0, refusals = 0;
  bit last_pick_wr, have_last;

  // AXI drivers
  initial begin
    aw_valid = 0; aw = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      aw_valid = 1; aw = '{id: TID_W'($urandom), addr: $urandom, len: LEN_W'($urandom)};
      @(posedge clk);
      while (!aw_ready) @(posedge clk);
      awq.push_back(aw);
      for (int b = 0; b <= int'(aw.len); b++) wdq.push_back(32'(i * 16 + b));
      #1 aw_valid = 0;
    end
  end
  initial begin
    w_valid = 0; w = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      while (awq.size() <= i && i >= 0) @(posedge clk);
      for (int b = 0; b <= int'(awq[i].len); b++) begin
        @(negedge clk);
        w_valid = 1; w = '{data: 32'(i * 16 + b), last: (b == int'(awq[i].len))};
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
      ar_valid = 1; ar = '{id: TID_W'($urandom), addr: $urandom, len: LEN_W'($urandom)};
      @(posedge clk);
      while (!ar_ready) @(posedge clk);
      arq.push_back(ar);
      #1 ar_valid = 0;
    end
  end

  // reorder-unit stand-in: combinational grant decided at the negedge
  logic grant_coin;
  always @(negedge clk) grant_coin <= ($urandom_range(0, 2) != 0);
  assign adm_grant = adm_req && grant_coin;
  assign adm_seq   = SEQ_W'(seqc[adm_tid]);
  always @(negedge clk) begin
    msg_ready <= ($urandom_range(0, 3) != 0);
    wd_ready  <= ($urandom_range(0, 3) != 0);
  end

  int wi = 0, ri = 0, n_aw = 0, n_ar = 0;
  req_msg_t e;
  always @(posedge clk) if (rst_n) begin
    if (adm_req) begin
      // alternate when both kinds wait
      if (n_aw > wi && n_ar > ri && have_last) begin
        chk(adm_is_wr != last_pick_wr, "write/read attempts alternate");
        alt_checks++;
      end
      last_pick_wr = adm_is_wr; have_last = 1;
      if (adm_is_wr) chk(adm_size == 1 && adm_tid == awq[wi].id, "write admittance request");
      else chk(adm_size == SIZE_W'(arq[ri].len) + 2 && adm_tid == arq[ri].id, "read admittance request");
      if (adm_grant) begin
        if (adm_is_wr) begin
          granted.push_back('{mtype: MSG_WR_REQ, tid: awq[wi].id, seq: SEQ_W'(seqc[adm_tid]), addr: awq[wi].addr, len: awq[wi].len});
          wi++;
        end else begin
          granted.push_back('{mtype: MSG_RD_REQ, tid: arq[ri].id, seq: SEQ_W'(seqc[adm_tid]), addr: arq[ri].addr, len: arq[ri].len});
          ri++;
        end
        seqc[adm_tid] <= (seqc[adm_tid] + 1) % 8;
      end else refusals++;
    end
    if (msg_valid && msg_ready) begin
      e = granted.pop_front();
      chk(msg == e, "message fields and order");
      n_msg++;
    end
    if (aw_valid && aw_ready) n_aw++;
    if (ar_valid && ar_ready) n_ar++;
    if (wd_valid && wd_ready) begin
      chk(wd.data == wdq[n_wd], "write data order");
      n_wd++;
    end
  end

  initial begin
    foreach (seqc[i]) seqc[i] = 0;
    have_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_msg == 2 * N && awq.size() == N);
    wait (n_wd == wdq.size());
    repeat (50) @(posedge clk);
    chk(n_wd == wdq.size(), "all write data passed");
    chk(alt_checks > 20 && refusals > 20, "arbitration and refusals exercised");
    $display("messages %0d, alternation checks %0d, refusals %0d", n_msg, alt_checks, refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
