// slave_ni: the slave-side network interface. Request packets from the
// router pass the packet queue into the depacketizer, which drives the slave
// core's AXI write-address, write-data and read-address channels; the header
// of each request is kept in the header FIFO. The slave's write responses
// and read data enter the AXI queue, and the packetizer sends each as a
// response packet whose header the adapter derives from the oldest stored
// request header. There is no reordering here: the slave is expected to
// answer in the order it received the requests. Structure as in the
// document; depths are this design's choice.
module slave_ni
  import noc_pkg::*;
#(
  parameter int PKT_BUF_DEPTH = 8,
  parameter int HDR_DEPTH     = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  input  logic   req_valid,
  output logic   req_ready,
  input  flit_t  req_flit,
  output logic   resp_valid,
  input  logic   resp_ready,
  output flit_t  resp_flit,
  output logic   aw_valid,
  input  logic   aw_ready,
  output axi_a_t aw,
  output logic   w_valid,
  input  logic   w_ready,
  output axi_w_t w,
  output logic   ar_valid,
  input  logic   ar_ready,
  output axi_a_t ar,
  input  logic   r_valid,
  output logic   r_ready,
  input  axi_r_t r,
  input  logic   b_valid,
  output logic   b_ready,
  input  axi_b_t b
);
  logic      pq_valid, pq_ready, hdr_push, hdr_full, hdr_pop, hdr_empty;
  flit_t     pq_flit;
  hdr_t      hdr_in, hdr_out;
  logic      rsp_valid, rsp_ready;
  rsp_beat_t rsp;

  packet_queue_s #(.DEPTH(PKT_BUF_DEPTH)) u_pq (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_flit(req_flit),
    .out_valid(pq_valid), .out_ready(pq_ready), .out_flit(pq_flit),
    .hdr_push, .hdr(hdr_in), .hdr_full);

  depacketizer_s u_depkt (
    .clk, .rst_n, .in_valid(pq_valid), .in_ready(pq_ready), .in_flit(pq_flit),
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .ar_valid, .ar_ready, .ar);

  header_fifo #(.DEPTH(HDR_DEPTH)) u_hfifo (
    .clk, .rst_n, .push(hdr_push), .din(hdr_in), .full(hdr_full),
    .pop(hdr_pop), .dout(hdr_out), .empty(hdr_empty));

  axi_queue_s u_axiq (
    .clk, .rst_n, .r_valid, .r_ready, .r, .b_valid, .b_ready, .b,
    .hdr_valid(!hdr_empty), .hdr_is_wr(hdr_out.mtype == MSG_WR_REQ),
    .rsp_valid, .rsp_ready, .rsp);

  packetizer_s u_pkt (
    .clk, .rst_n, .node_x, .node_y,
    .hdr_valid(!hdr_empty), .hdr(hdr_out), .hdr_pop,
    .rsp_valid, .rsp_ready, .rsp, .resp_valid, .resp_ready, .resp_flit);
endmodule
