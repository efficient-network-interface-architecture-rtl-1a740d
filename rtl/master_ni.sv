// master_ni: the master-side network interface. The forward path (AXI queue,
// packetizer) turns the master core's AXI write and read requests into
// request packets; the reverse path (packet queue, depacketizer) turns
// response packets into AXI read data and write responses; the reorder unit
// is shared by both. It numbers the messages of each transaction ID, admits
// a message only when the reorder buffer can hold its response, sends
// in-order responses straight to the depacketizer and parks out-of-order
// ones in the reorder buffer until their turn, so the master sees the
// responses of each ID in the order it issued them. The node's own mesh
// coordinates come in on node_x/node_y. The structure follows the document;
// buffer depths and row counts not given there are parameters with this
// design's defaults.
module master_ni
  import noc_pkg::*;
#(
  parameter int RB_DEPTH      = 48,
  parameter int ST_ROWS       = 8,
  parameter int RT_ROWS       = 16,
  parameter int PKT_BUF_DEPTH = 8,
  parameter int MESH_X        = 5,
  parameter int MESH_Y        = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  input  logic   aw_valid,
  output logic   aw_ready,
  input  axi_a_t aw,
  input  logic   w_valid,
  output logic   w_ready,
  input  axi_w_t w,
  input  logic   ar_valid,
  output logic   ar_ready,
  input  axi_a_t ar,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b,
  output logic   req_valid,
  input  logic   req_ready,
  output flit_t  req_flit,
  input  logic   resp_valid,
  output logic   resp_ready,
  input  flit_t  resp_flit,
  // observation
  output logic   adm_attempt,
  output logic   adm_refused,
  output logic   pkt_to_rb,
  output logic   pkt_from_rb,
  output logic   map_err,
  output logic [$clog2(RB_DEPTH+1)-1:0] size_aom,
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_used
);
  logic               adm_req, adm_grant;
  logic [TID_W-1:0]   adm_tid, lk_tid, dlv_tid;
  logic [SIZE_W-1:0]  adm_size, dlv_size;
  logic [SEQ_W-1:0]   adm_seq, lk_seq;
  logic               lk_inorder, dlv_head, dlv_tail, from_rb;
  logic               msg_valid, msg_ready, wd_valid, wd_ready;
  req_msg_t           msg;
  axi_w_t             wd;
  logic               dir_valid, dir_ready, st_valid, st_ready, rel_valid, rel_ready;
  flit_t              dir_flit, st_flit, rel_flit;

  axi_queue_m u_axiq (
    .clk, .rst_n, .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w,
    .ar_valid, .ar_ready, .ar,
    .adm_req, .adm_tid, .adm_size, .adm_is_wr(), .adm_grant, .adm_seq,
    .msg_valid, .msg_ready, .msg, .wd_valid, .wd_ready, .wd);

  packetizer_m #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_pkt (
    .clk, .rst_n, .node_x, .node_y, .msg_valid, .msg_ready, .msg,
    .wd_valid, .wd_ready, .wd, .req_valid, .req_ready, .req_flit, .map_err);

  packet_queue_m #(.DEPTH(PKT_BUF_DEPTH)) u_pq (
    .clk, .rst_n, .in_valid(resp_valid), .in_ready(resp_ready), .in_flit(resp_flit),
    .lk_tid, .lk_seq, .lk_inorder,
    .dir_valid, .dir_ready, .dir_flit, .st_valid, .st_ready, .st_flit);

  depacketizer_m u_depkt (
    .clk, .rst_n, .dir_valid, .dir_ready, .dir_flit, .rel_valid, .rel_ready, .rel_flit,
    .r_valid, .r_ready, .r, .b_valid, .b_ready, .b,
    .dlv_head, .dlv_tid, .dlv_size, .dlv_tail, .from_rb);

  reorder_unit #(.RB_DEPTH(RB_DEPTH), .ST_ROWS(ST_ROWS), .RT_ROWS(RT_ROWS)) u_ru (
    .clk, .rst_n, .adm_req, .adm_tid, .adm_size, .adm_grant, .adm_seq,
    .lk_tid, .lk_seq, .lk_inorder,
    .st_valid, .st_ready, .st_flit, .rel_valid, .rel_ready, .rel_flit,
    .dlv_head, .dlv_tid, .dlv_size, .dlv_tail,
    .status_reg(), .size_aom, .used_slots(rb_used));

  assign adm_attempt = adm_req;
  assign adm_refused = adm_req && !adm_grant;
  assign pkt_to_rb   = st_valid && st_ready && st_flit.head;
  assign pkt_from_rb = dlv_head && from_rb;
endmodule
