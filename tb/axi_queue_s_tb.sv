// axi_queue_s_tb: self-checking test of the slave-side AXI queue. A list of
// responses (writes, and reads of 1..8 beats) is produced by an in-order
// slave stand-in on B and R with random gaps, while the test plays the
// header FIFO (type of the oldest response) and the packetizer (random
// ready). It checks that the beats offered follow the list: a write gives
// one beat with its B resp, a read its data beats with their resp, in order,
// and that nothing is offered when no header is waiting.
`timescale 1ns/1ps
module axi_queue_s_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic r_valid, r_ready, b_valid, b_ready, hdr_valid, hdr_is_wr, rsp_valid, rsp_ready;
  axi_r_t r;
  axi_b_t b;
  rsp_beat_t rsp;

  axi_queue_s dut (.*);

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
  typedef struct { bit wr; int len; } rq_t;
  rq_t       list [$];     // as the header FIFO sees them
  rsp_beat_t beats [$];    // expected beats in order
  int        beat_in_cur = 0, n_beats = 0;

  // producer: slave answering in order
  initial begin
    rq_t q;
    r_valid = 0; b_valid = 0; r = '0; b = '0;
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      q.wr = ($urandom_range(0, 1) == 1); q.len = $urandom_range(0, 7);
      list.push_back(q);
      if (q.wr) begin
        b = '{id: TID_W'(i), resp: 2'($urandom)};
        beats.push_back('{is_wr: 1'b1, data: '0, resp: b.resp});
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        b_valid = 1;
        @(posedge clk);
        while (!b_ready) @(posedge clk);
        #1 b_valid = 0;
      end else begin
        for (int k = 0; k <= q.len; k++) begin
          r = '{id: TID_W'(i), data: $urandom, resp: 2'($urandom), last: (k == q.len)};
          beats.push_back('{is_wr: 1'b0, data: r.data, resp: r.resp});
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          r_valid = 1;
          @(posedge clk);
          while (!r_ready) @(posedge clk);
          #1 r_valid = 0;
        end
      end
    end
  end

  // header FIFO and packetizer stand-in
  always @(negedge clk) begin
    hdr_valid = (list.size() > 0);
    hdr_is_wr = (list.size() > 0) ? list[0].wr : 1'b0;
    rsp_ready = ($urandom_range(0, 2) != 0);
  end

  rsp_beat_t e;
  always @(posedge clk) if (rst_n) begin
    if (!hdr_valid) chk(!rsp_valid, "nothing offered without a header");
    if (rsp_valid && rsp_ready) begin
      e = beats.pop_front();
      chk(rsp == e, "response beat");
      n_beats++;
      if (list[0].wr || beat_in_cur == list[0].len) begin
        void'(list.pop_front());
        beat_in_cur = 0;
      end else beat_in_cur++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    wait (list.size() == 0);
    repeat (3) @(posedge clk);
    chk(beats.size() == 0 && n_beats > N, "all beats passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
