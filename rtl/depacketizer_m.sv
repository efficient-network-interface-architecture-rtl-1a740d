// depacketizer_m: the master-side depacketizer. Its control chooses the next
// packet from one of two sources, the reorder buffer (rel_*) or the packet
// queue (dir_*), preferring the reorder buffer, and keeps that choice until
// the packet's tail. The head flit is decoded: a read response's data flits
// become AXI read-data beats (id and resp from the header, last on the tail
// flit); a write response, a single flit, becomes one AXI write response and
// is accepted only together with the B handshake. The head of a read
// response is consumed in one cycle. In the cycle a head flit is accepted
// dlv_head reports T-ID and packet size to the reorder unit, and dlv_tail
// marks the cycle the tail is accepted. The two-source mux and the AXI
// restoration follow the document; the source priority and the single resp
// code per read burst are this design's own.
module depacketizer_m
  import noc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic  dir_valid,
  output logic  dir_ready,
  input  flit_t dir_flit,
  input  logic  rel_valid,
  output logic  rel_ready,
  input  flit_t rel_flit,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b,
  output logic              dlv_head,
  output logic [TID_W-1:0]  dlv_tid,
  output logic [SIZE_W-1:0] dlv_size,
  output logic              dlv_tail,
  output logic              from_rb     // current flit comes from the reorder buffer
);
  logic  busy, sel_rb;           // locked source while inside a packet
  logic  use_rb, f_valid, f_ready, fire;
  flit_t f;
  hdr_t  h;
  logic [TID_W-1:0] cur_tid;
  logic [1:0]       cur_resp;

  always_comb begin
    use_rb  = busy ? sel_rb : rel_valid;
    f_valid = use_rb ? rel_valid : dir_valid;
    f       = use_rb ? rel_flit  : dir_flit;
    h       = data2hdr(f.data);
    r_valid = 1'b0;
    r       = '0;
    b_valid = 1'b0;
    b       = '0;
    f_ready = 1'b0;
    if (f.head) begin
      if (h.mtype == MSG_WR_RESP) begin
        b_valid = f_valid;
        b.id    = h.tid;
        b.resp  = h.resp;
        f_ready = b_ready;
      end else begin
        f_ready = 1'b1;
      end
    end else begin
      r_valid = f_valid;
      r.id    = cur_tid;
      r.data  = f.data;
      r.resp  = cur_resp;
      r.last  = f.tail;
      f_ready = r_ready;
    end
    fire      = f_valid && f_ready;
    rel_ready = use_rb && f_ready;
    dir_ready = !use_rb && f_ready;
    dlv_head  = fire && f.head;
    dlv_tid   = h.tid;
    dlv_size  = pkt_size(h);
    dlv_tail  = fire && f.tail;
    from_rb   = use_rb;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      sel_rb   <= 1'b0;
      cur_tid  <= '0;
      cur_resp <= '0;
    end else if (fire) begin
      if (!busy) sel_rb <= use_rb;
      busy <= !f.tail;
      if (f.head) begin
        cur_tid  <= h.tid;
        cur_resp <= h.resp;
      end
    end
  end
endmodule
