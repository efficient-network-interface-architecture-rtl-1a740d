// slave_ni_tb: self-checking test of the slave-side NI with a behavioural
// memory behind it. Request packets from random source nodes (reads and
// writes of 1..8 beats; write data follows a known address pattern) are fed
// from the router side with random gaps, and the response side applies
// random back-pressure. It checks each response packet: destination = the
// requester, source = this node, response type, T-ID, sequence number and
// length carried over, resp code and read data from the memory's pattern,
// head/tail marks, responses in request order; and that the memory saw
// every write beat correct.
`timescale 1ns/1ps
module slave_ni_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [COORD_W-1:0] NX = 3'd4, NY = 3'd1;
  logic req_valid, req_ready, resp_valid, resp_ready;
  flit_t req_flit, resp_flit;
  logic aw_valid, aw_ready, w_valid, w_ready, ar_valid, ar_ready, r_valid, r_ready, b_valid, b_ready;
  axi_a_t aw, ar;
  axi_w_t w;
  axi_r_t r;
  axi_b_t b;
  int mem_errors, n_reads, n_writes;

  slave_ni dut (.clk, .rst_n, .node_x(NX), .node_y(NY), .req_valid, .req_ready, .req_flit,
    .resp_valid, .resp_ready, .resp_flit, .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r, .b_valid, .b_ready, .b);
  axi_mem_model #(.MAX_DELAY(4), .SEED(7)) mem (.clk, .rst_n, .aw_valid, .aw_ready, .aw,
    .w_valid, .w_ready, .w, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .b_valid, .b_ready, .b, .errors(mem_errors), .n_reads, .n_writes);

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

  function automatic logic [31:0] pat(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  localparam int N = 400;
  flit_t exp_q [$];
  int    n_pkts = 0;

  always @(negedge clk) resp_ready <= ($urandom_range(0, 3) != 0);

  flit_t e;
  always @(posedge clk) if (rst_n && resp_valid && resp_ready) begin
    e = exp_q.pop_front();
    chk(resp_flit == e, "response flit");
    if (e.tail) n_pkts++;
  end

  initial begin
    flit_t f [$];
    hdr_t h, o;
    logic [31:0] addr;
    req_valid = 0; req_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < N; p++) begin
      h = '0;
      h.src_x = COORD_W'($urandom_range(0, 4)); h.src_y = COORD_W'($urandom_range(0, 4));
      h.dst_x = NX; h.dst_y = NY;
      h.tid = TID_W'($urandom); h.seq = SEQ_W'($urandom); h.len = LEN_W'($urandom);
      h.mtype = ($urandom_range(0, 1) == 1) ? MSG_WR_REQ : MSG_RD_REQ;
      addr = {5'd9, 27'($urandom)} & 32'hFFFF_FFFC;
      o = h;
      o.dst_x = h.src_x; o.dst_y = h.src_y; o.src_x = NX; o.src_y = NY;
      o.mtype = (h.mtype == MSG_WR_REQ) ? MSG_WR_RESP : MSG_RD_RESP;
      o.resp = {1'b0, addr[2]};
      f.delete();
      f.push_back('{head: 1'b1, tail: 1'b0, data: hdr2data(h)});
      f.push_back('{head: 1'b0, tail: (h.mtype == MSG_RD_REQ), data: addr});
      exp_q.push_back('{head: 1'b1, tail: (h.mtype == MSG_WR_REQ), data: hdr2data(o)});
      for (int k = 0; k <= int'(h.len); k++) begin
        if (h.mtype == MSG_WR_REQ)
          f.push_back('{head: 1'b0, tail: (k == int'(h.len)), data: pat(addr + 32'(4 * k))});
        else
          exp_q.push_back('{head: 1'b0, tail: (k == int'(h.len)), data: pat(addr + 32'(4 * k))});
      end
      foreach (f[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin req_valid = 0; @(negedge clk); end
        req_valid = 1; req_flit = f[i];
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        #1 req_valid = 0;
      end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk(n_pkts == N && n_reads + n_writes == N, "every request answered");
    chk(mem_errors == 0, "write data reached the memory intact");
    $display("reads %0d writes %0d", n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
