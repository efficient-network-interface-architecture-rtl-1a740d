// packetizer_s_tb: self-checking test of the slave-side packetizer and its
// adapter. Stored request headers (random source node, T-ID, sequence
// number, length, read or write) and their response beats are offered with
// random gaps, the router side with random back-pressure. Each response
// packet is checked against one built independently: head flit with
// destination = the request's source, source = this node, response type,
// the same T-ID, sequence number and length and the first beat's resp; then
// for a read len+1 data flits; head/tail marks; and exactly one header-FIFO
// pop per packet, with its last flit. With no back-pressure the flits of a
// packet leave on consecutive cycles.
// The expected responses follow the document's adapter (response header
// derived from the request header); the checks are this design's own.
`timescale 1ns/1ps
module packetizer_s_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] node_x = 3'd1, node_y = 3'd3;
  logic hdr_valid, hdr_pop, rsp_valid, rsp_ready, resp_valid, resp_ready;
  hdr_t hdr;
  rsp_beat_t rsp;
  flit_t resp_flit;

  packetizer_s dut (.*);

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

  localparam int N = 600;
  hdr_t      hq [$];
  rsp_beat_t bq [$];
  flit_t     exp_q [$];
  bit        free_run = 0;
  int        n_pkts = 0, n_pops = 0, head_cyc, cyc = 0;

  // header FIFO and response beats (with random gaps), refreshed mid-cycle
  always @(negedge clk) begin
    hdr_valid  = (hq.size() > 0);
    hdr        = (hq.size() > 0) ? hq[0] : '0;
    // a beat once offered stays offered until taken, as from a FIFO
    rsp_valid  = (bq.size() > 0) && (free_run || held || $urandom_range(0, 3) != 0);
    rsp        = (bq.size() > 0) ? bq[0] : '0;
    resp_ready = free_run || ($urandom_range(0, 3) != 0);
  end

  flit_t e;
  hdr_t  ch;
  bit    held = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (resp_valid && resp_ready) begin
      e = exp_q.pop_front();
      chk(resp_flit == e, "response flit");
      if (e.head) begin head_cyc = cyc; ch = data2hdr(e.data); end
      chk(hdr_pop == e.tail, "header popped with last flit");
      if (e.tail) begin
        n_pkts++;
        if (free_run) chk(cyc - head_cyc == ((ch.mtype == MSG_RD_RESP) ? int'(ch.len) + 1 : 0), "flits on consecutive cycles");
      end
    end else chk(!hdr_pop, "no pop without a last flit");
    if (hdr_pop) begin void'(hq.pop_front()); n_pops++; end
    held = rsp_valid && !rsp_ready;
    if (rsp_valid && rsp_ready) void'(bq.pop_front());
  end

  initial begin
    hdr_t h, o;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      if (i == N - 40) begin wait (exp_q.size() == 0); free_run = 1; end
      h = '0;
      h.src_x = COORD_W'($urandom_range(0, 4)); h.src_y = COORD_W'($urandom_range(0, 4));
      h.dst_x = node_x; h.dst_y = node_y;
      h.tid = TID_W'($urandom); h.seq = SEQ_W'($urandom); h.len = LEN_W'($urandom);
      h.mtype = ($urandom_range(0, 1) == 1) ? MSG_WR_REQ : MSG_RD_REQ;
      o = h;
      o.dst_x = h.src_x; o.dst_y = h.src_y; o.src_x = node_x; o.src_y = node_y;
      o.mtype = (h.mtype == MSG_WR_REQ) ? MSG_WR_RESP : MSG_RD_RESP;
      o.resp = 2'($urandom);
      exp_q.push_back('{head: 1'b1, tail: (h.mtype == MSG_WR_REQ), data: hdr2data(o)});
      if (h.mtype == MSG_WR_REQ) bq.push_back('{is_wr: 1'b1, data: '0, resp: o.resp});
      else
        for (int k = 0; k <= int'(h.len); k++) begin
          logic [31:0] d = $urandom;
          bq.push_back('{is_wr: 1'b0, data: d, resp: (k == 0) ? o.resp : 2'($urandom)});
          exp_q.push_back('{head: 1'b0, tail: (k == int'(h.len)), data: d});
        end
      hq.push_back(h);
      while (hq.size() > 4) @(posedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    chk(n_pkts == N && n_pops == N, "all packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
