// ni_node: one node of a mesh in which every node has both a master core
// and a slave (memory) core. It holds a master-side NI and a slave-side NI
// side by side. The master NI's request output and response input and the
// slave NI's request input and response output are all brought out, ready
// to be joined to a router's local port; how the two NIs share that port is
// left to the integration. NODE_X/NODE_Y give the node's mesh position,
// stamped as source into every packet either NI sends. Observation outputs
// count nothing themselves; they pulse on admittance attempts and refusals
// and on packets entering and leaving the reorder buffer.
// Pairing a master NI and a slave NI in one node follows the document's
// second system configuration; keeping their router links separate is this
// design's own choice.
module ni_node
  import noc_pkg::*;
#(
  parameter int NODE_X   = 0,
  parameter int NODE_Y   = 0,
  parameter int MESH_X   = 5,
  parameter int MESH_Y   = 5,
  parameter int RB_DEPTH = 48,
  parameter int ST_ROWS  = 8,
  parameter int RT_ROWS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  // master core side
  input  logic   m_aw_valid,
  output logic   m_aw_ready,
  input  axi_a_t m_aw,
  input  logic   m_w_valid,
  output logic   m_w_ready,
  input  axi_w_t m_w,
  input  logic   m_ar_valid,
  output logic   m_ar_ready,
  input  axi_a_t m_ar,
  output logic   m_r_valid,
  input  logic   m_r_ready,
  output axi_r_t m_r,
  output logic   m_b_valid,
  input  logic   m_b_ready,
  output axi_b_t m_b,
  // master NI router links
  output logic   m_req_valid,
  input  logic   m_req_ready,
  output flit_t  m_req_flit,
  input  logic   m_resp_valid,
  output logic   m_resp_ready,
  input  flit_t  m_resp_flit,
  // slave NI router links
  input  logic   s_req_valid,
  output logic   s_req_ready,
  input  flit_t  s_req_flit,
  output logic   s_resp_valid,
  input  logic   s_resp_ready,
  output flit_t  s_resp_flit,
  // slave core side
  output logic   s_aw_valid,
  input  logic   s_aw_ready,
  output axi_a_t s_aw,
  output logic   s_w_valid,
  input  logic   s_w_ready,
  output axi_w_t s_w,
  output logic   s_ar_valid,
  input  logic   s_ar_ready,
  output axi_a_t s_ar,
  input  logic   s_r_valid,
  output logic   s_r_ready,
  input  axi_r_t s_r,
  input  logic   s_b_valid,
  output logic   s_b_ready,
  input  axi_b_t s_b,
  // observation
  output logic   adm_attempt,
  output logic   adm_refused,
  output logic   pkt_to_rb,
  output logic   pkt_from_rb,
  output logic   map_err,
  output logic [$clog2(RB_DEPTH+1)-1:0] size_aom,
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_used
);
  localparam logic [COORD_W-1:0] NX = COORD_W'(NODE_X);
  localparam logic [COORD_W-1:0] NY = COORD_W'(NODE_Y);

  master_ni #(.RB_DEPTH(RB_DEPTH), .ST_ROWS(ST_ROWS), .RT_ROWS(RT_ROWS),
              .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_mni (
    .clk, .rst_n, .node_x(NX), .node_y(NY),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b),
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_flit(m_req_flit),
    .resp_valid(m_resp_valid), .resp_ready(m_resp_ready), .resp_flit(m_resp_flit),
    .adm_attempt, .adm_refused, .pkt_to_rb, .pkt_from_rb, .map_err, .size_aom, .rb_used);

  slave_ni u_sni (
    .clk, .rst_n, .node_x(NX), .node_y(NY),
    .req_valid(s_req_valid), .req_ready(s_req_ready), .req_flit(s_req_flit),
    .resp_valid(s_resp_valid), .resp_ready(s_resp_ready), .resp_flit(s_resp_flit),
    .aw_valid(s_aw_valid), .aw_ready(s_aw_ready), .aw(s_aw),
    .w_valid(s_w_valid), .w_ready(s_w_ready), .w(s_w),
    .ar_valid(s_ar_valid), .ar_ready(s_ar_ready), .ar(s_ar),
    .r_valid(s_r_valid), .r_ready(s_r_ready), .r(s_r),
    .b_valid(s_b_valid), .b_ready(s_b_ready), .b(s_b));
endmodule
