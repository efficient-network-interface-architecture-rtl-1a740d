// reorder_unit: the master NI's reorder unit, shared by the forward and the
// reverse path. It joins the status register and status table
// (status_table: sequence numbers, admittance, in-order decision, size_aom)
// with the reorder table and reorder buffer (reorder_buffer: storage and
// release of out-of-order packets). The status table's expected sequence
// number per transaction ID drives the buffer's release decision. All
// interface timing is that of the two parts: admittance and lookup answer in
// the same cycle, stored flits are accepted one per cycle, released flits
// start the cycle after the release decision.
// The grouping of the four parts follows the document; the wiring between
// them is this design's own.
module reorder_unit
  import noc_pkg::*;
#(
  parameter int RB_DEPTH = 48,
  parameter int ST_ROWS  = 8,
  parameter int RT_ROWS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic               adm_req,
  input  logic [TID_W-1:0]   adm_tid,
  input  logic [SIZE_W-1:0]  adm_size,
  output logic               adm_grant,
  output logic [SEQ_W-1:0]   adm_seq,
  input  logic [TID_W-1:0]   lk_tid,
  input  logic [SEQ_W-1:0]   lk_seq,
  output logic               lk_inorder,
  input  logic  st_valid,
  output logic  st_ready,
  input  flit_t st_flit,
  output logic  rel_valid,
  input  logic  rel_ready,
  output flit_t rel_flit,
  input  logic               dlv_head,
  input  logic [TID_W-1:0]   dlv_tid,
  input  logic [SIZE_W-1:0]  dlv_size,
  input  logic               dlv_tail,
  output logic [NUM_TID-1:0] status_reg,
  output logic [$clog2(RB_DEPTH+1)-1:0] size_aom,
  output logic [$clog2(RB_DEPTH+1)-1:0] used_slots
);
  logic [NUM_TID-1:0] exp_valid;
  logic [SEQ_W-1:0]   exp_seq [NUM_TID];

  status_table #(.ST_ROWS(ST_ROWS), .RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS)) u_st (
    .clk, .rst_n,
    .adm_req, .adm_tid, .adm_size, .adm_grant, .adm_seq,
    .lk_tid, .lk_seq, .lk_inorder,
    .dlv_head, .dlv_tid, .dlv_size, .dlv_tail,
    .exp_valid, .exp_seq, .status_reg, .size_aom, .resv_cnt());

  reorder_buffer #(.RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS)) u_rb (
    .clk, .rst_n,
    .st_valid, .st_ready, .st_flit,
    .exp_valid, .exp_seq,
    .rel_valid, .rel_ready, .rel_flit,
    .used_slots, .used_rows());
endmodule
