// packet_queue_s: the slave-side packet queue. Request flits from the router
// wait in a packet buffer (FIFO) and go on to the depacketizer one per cycle.
// Its control copies the header of each request into the header FIFO in the
// cycle the head flit leaves; a head flit waits while the header FIFO is
// full. The role follows the document (the control's link to the header FIFO
// is drawn in its slave-NI diagram); depth and timing are this design's own.
module packet_queue_s
  import noc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit,
  output logic  hdr_push,
  output hdr_t  hdr,
  input  logic  hdr_full
);
  logic  q_valid, q_ready;
  flit_t q;

  sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_pbuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_flit),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q), .count());

  always_comb begin
    out_flit  = q;
    out_valid = q_valid && !(q.head && hdr_full);
    q_ready   = out_ready && !(q.head && hdr_full);
    hdr       = data2hdr(q.data);
    hdr_push  = q_valid && q_ready && q.head;
  end
endmodule
