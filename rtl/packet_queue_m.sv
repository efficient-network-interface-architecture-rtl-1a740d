// packet_queue_m: the master-side packet queue. Response flits from the
// router enter a packet buffer (FIFO). When a head flit reaches the buffer's
// output, its T-ID and sequence number go to the reorder unit (lk_*), whose
// combinational answer steers the packet: in order to the depacketizer
// (dir_*), out of order to the reorder buffer (st_*). The decision is taken
// in the cycle the head flit leaves and held for the rest of the packet, up
// to and including the tail flit. One flit per cycle on every port.
// Steering by the reorder unit follows the document; the buffer depth and
// the decide-on-departure timing are this design's choice.
module packet_queue_m
  import noc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic [TID_W-1:0] lk_tid,
  output logic [SEQ_W-1:0] lk_seq,
  input  logic             lk_inorder,
  output logic  dir_valid,
  input  logic  dir_ready,
  output flit_t dir_flit,
  output logic  st_valid,
  input  logic  st_ready,
  output flit_t st_flit
);
  logic  q_valid, q_ready;
  flit_t q;
  hdr_t  h;
  logic  in_pkt;     // inside a packet whose route is fixed
  logic  to_rb;      // route of that packet
  logic  route_rb;   // route used this cycle

  sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_pbuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_flit),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q), .count());

  always_comb begin
    h        = data2hdr(q.data);
    lk_tid   = h.tid;
    lk_seq   = h.seq;
    route_rb = in_pkt ? to_rb : !lk_inorder;
    dir_flit = q;
    st_flit  = q;
    dir_valid = q_valid && !route_rb;
    st_valid  = q_valid && route_rb;
    q_ready   = route_rb ? st_ready : dir_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      to_rb  <= 1'b0;
    end else if (q_valid && q_ready) begin
      if (!in_pkt) to_rb <= route_rb;
      in_pkt <= !q.tail;
    end
  end
endmodule
