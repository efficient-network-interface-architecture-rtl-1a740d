// packetizer_m_tb: self-checking test of the master-side packetizer. Random
// read and write messages (with write data) are offered; the router side
// applies random back-pressure. Each packet is checked flit by flit against
// a packet built independently: head flit with destination (node number in
// the top five address bits, x = n mod 5, y = n div 5), source, type, T-ID,
// sequence number and length; then the address flit; then the write data;
// head and tail marks; and the mapping error flag. A final phase with no
// back-pressure checks the rate: a packet's flits leave on consecutive
// cycles (a write of len+1 beats in len+3 cycles).
// The expected packets follow this design's packet format (its own, as the
// document gives none); the checks are this design's own.
`timescale 1ns/1ps
module packetizer_m_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] node_x = 3'd2, node_y = 3'd4;
  logic msg_valid, msg_ready, wd_valid, wd_ready, req_valid, req_ready, map_err;
  req_msg_t msg;
  axi_w_t wd;
  flit_t req_flit;

  packetizer_m dut (.*);

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

  flit_t exp_q [$];
  bit    err_q [$];
  logic [31:0] wdata_q [$];
  bit    free_run = 0;
  int    n_pkts = 0, head_cyc, cyc = 0;

  task automatic send_msg(input req_msg_t m);
    hdr_t h = '0;
    int node = int'(m.addr[31:27]);
    h.dst_x = COORD_W'(node % 5); h.dst_y = COORD_W'(node / 5);
    h.src_x = node_x; h.src_y = node_y;
    h.mtype = m.mtype; h.tid = m.tid; h.seq = m.seq; h.len = m.len;
    exp_q.push_back('{head: 1'b1, tail: 1'b0, data: hdr2data(h)});
    exp_q.push_back('{head: 1'b0, tail: (m.mtype == MSG_RD_REQ), data: m.addr});
    err_q.push_back(node >= 25);
    if (m.mtype == MSG_WR_REQ)
      for (int b = 0; b <= int'(m.len); b++) begin
        logic [31:0] d = $urandom;
        wdata_q.push_back(d);
        exp_q.push_back('{head: 1'b0, tail: (b == int'(m.len)), data: d});
      end
    @(negedge clk);
    msg_valid = 1; msg = m;
    @(posedge clk);
    while (!msg_ready) @(posedge clk);
    #1 msg_valid = 0;
  endtask

  // write data feeder
  initial begin
    wd_valid = 0; wd = '0;
    forever begin
      @(negedge clk);
      if (wdata_q.size() > 0 && (free_run || $urandom_range(0, 3) != 0)) begin
        wd_valid = 1; wd.data = wdata_q[0]; wd.last = 0;
      end else wd_valid = 0;
      @(posedge clk);
      if (wd_valid && wd_ready) void'(wdata_q.pop_front());
    end
  end
  always @(negedge clk) req_ready <= free_run || ($urandom_range(0, 3) != 0);

  flit_t e;
  hdr_t  cur_h;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && req_valid && req_ready) begin
      e = exp_q.pop_front();
      chk(req_flit == e, "flit matches");
      if (req_flit.head) begin head_cyc = cyc; cur_h = data2hdr(req_flit.data); end
      if (req_flit.tail) begin
        n_pkts++;
        if (free_run) chk(cyc - head_cyc == ((cur_h.mtype == MSG_WR_REQ) ? int'(cur_h.len) + 2 : 1),
                          "one flit per cycle");
      end
    end
    if (rst_n && req_valid && req_flit.head) chk(map_err == err_q[0], "mapping error flag");
    if (rst_n && req_valid && req_ready && req_flit.tail) void'(err_q.pop_front());
  end

  initial begin
    req_msg_t m;
    msg_valid = 0; msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      m.mtype = ($urandom_range(0, 1) == 1) ? MSG_WR_REQ : MSG_RD_REQ;
      m.tid = TID_W'($urandom); m.seq = SEQ_W'($urandom); m.len = LEN_W'($urandom);
      m.addr = $urandom;
      if (i == 600 - 50) begin wait (exp_q.size() == 0); free_run = 1; end
      send_msg(m);
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk(n_pkts == 600, "all packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
