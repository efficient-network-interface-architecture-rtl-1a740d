// depacketizer_s_tb: self-checking test of the slave-side depacketizer.
// Random read-request packets (head, address) and write-request packets
// (head, address, len+1 data flits) are fed with random gaps; AW, W and AR
// apply random back-pressure. It checks that each read gives one AR and
// each write one AW with the packet's T-ID, address and length, followed by
// exactly len+1 W beats with the packet's data and last on the final beat,
// in packet order.
`timescale 1ns/1ps
module depacketizer_s_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, aw_valid, aw_ready, w_valid, w_ready, ar_valid, ar_ready;
  flit_t in_flit;
  axi_a_t aw, ar;
  axi_w_t w;

  depacketizer_s dut (.*);

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

  typedef struct { bit wr; axi_a_t a; } ev_t;
  ev_t    addr_q [$];
  axi_w_t w_q [$];
  int n_a = 0, n_w = 0;

  always @(negedge clk) begin
    aw_ready <= ($urandom_range(0, 3) != 0);
    ar_ready <= ($urandom_range(0, 3) != 0);
    w_ready  <= ($urandom_range(0, 3) != 0);
  end

  ev_t e;
  axi_w_t ew;
  always @(posedge clk) if (rst_n) begin
    chk(!(aw_valid && ar_valid), "one address channel at a time");
    if ((aw_valid && aw_ready) || (ar_valid && ar_ready)) begin
      e = addr_q.pop_front();
      chk(e.wr == aw_valid, "request type");
      chk((e.wr ? aw : ar) == e.a, "address beat fields");
      n_a++;
    end
    if (w_valid && w_ready) begin
      ew = w_q.pop_front();
      chk(w == ew, "write beat");
      n_w++;
    end
  end

  initial begin
    flit_t f [$];
    hdr_t h;
    axi_a_t a;
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 600; p++) begin
      h = '0; h.tid = TID_W'($urandom); h.seq = SEQ_W'($urandom); h.len = LEN_W'($urandom);
      h.mtype = ($urandom_range(0, 1) == 1) ? MSG_WR_REQ : MSG_RD_REQ;
      a = '{id: h.tid, addr: $urandom, len: h.len};
      f.delete();
      f.push_back('{head: 1'b1, tail: 1'b0, data: hdr2data(h)});
      f.push_back('{head: 1'b0, tail: (h.mtype == MSG_RD_REQ), data: a.addr});
      addr_q.push_back('{h.mtype == MSG_WR_REQ, a});
      if (h.mtype == MSG_WR_REQ)
        for (int b = 0; b <= int'(h.len); b++) begin
          logic [31:0] d = $urandom;
          f.push_back('{head: 1'b0, tail: (b == int'(h.len)), data: d});
          w_q.push_back('{data: d, last: (b == int'(h.len))});
        end
      foreach (f[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_flit = f[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
    end
    wait (addr_q.size() == 0 && w_q.size() == 0);
    repeat (3) @(posedge clk);
    chk(n_a == 600, "all requests restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
