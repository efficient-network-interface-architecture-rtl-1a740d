// axi_queue_m: the master-side AXI queue. It takes the master core's write
// address, write data and read address channels, keeps write requests
// (address FIFO plus data FIFO) and read requests in separate buffers,
// arbitrates between the two, and asks the reorder unit for admittance.
//
// Each cycle in which the message register towards the packetizer is free and
// a request waits, one request is put to the reorder unit (adm_req with its
// T-ID and the size its response will occupy). The answer (adm_grant,
// adm_seq) comes back combinationally in the same cycle; a granted request is
// popped and loaded into the message register with its sequence number, a
// refused one stays and is tried again. When both kinds wait, the attempts
// alternate between write and read (round robin) so a refused write cannot
// block a read of another T-ID and the reverse. Write data leaves through its
// own stream (wd_*) in request order. Buffer separation and admittance follow
// the document; the round-robin policy and the buffer depths are this
// design's choice.
module axi_queue_m
  import noc_pkg::*;
#(
  parameter int REQ_DEPTH   = 4,
  parameter int WDATA_DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  // AXI from the master core
  input  logic     aw_valid,
  output logic     aw_ready,
  input  axi_a_t   aw,
  input  logic     w_valid,
  output logic     w_ready,
  input  axi_w_t   w,
  input  logic     ar_valid,
  output logic     ar_ready,
  input  axi_a_t   ar,
  // admittance
  output logic                adm_req,
  output logic [TID_W-1:0]    adm_tid,
  output logic [SIZE_W-1:0]   adm_size,
  output logic                adm_is_wr,   // the request under admittance is a write
  input  logic                adm_grant,
  input  logic [SEQ_W-1:0]    adm_seq,
  // to the packetizer
  output logic     msg_valid,
  input  logic     msg_ready,
  output req_msg_t msg,
  output logic     wd_valid,
  input  logic     wd_ready,
  output axi_w_t   wd
);
  logic   wq_valid, wq_pop, rq_valid, rq_pop;
  axi_a_t wq, rq;
  logic   pick_wr, last_wr, slot_free;

  sync_fifo #(.T(axi_a_t), .DEPTH(REQ_DEPTH)) u_wreq (
    .clk, .rst_n, .in_valid(aw_valid), .in_ready(aw_ready), .in_data(aw),
    .out_valid(wq_valid), .out_ready(wq_pop), .out_data(wq), .count());
  sync_fifo #(.T(axi_a_t), .DEPTH(REQ_DEPTH)) u_rreq (
    .clk, .rst_n, .in_valid(ar_valid), .in_ready(ar_ready), .in_data(ar),
    .out_valid(rq_valid), .out_ready(rq_pop), .out_data(rq), .count());
  sync_fifo #(.T(axi_w_t), .DEPTH(WDATA_DEPTH)) u_wdata (
    .clk, .rst_n, .in_valid(w_valid), .in_ready(w_ready), .in_data(w),
    .out_valid(wd_valid), .out_ready(wd_ready), .out_data(wd), .count());

  assign slot_free = !msg_valid || msg_ready;

  always_comb begin
    if (wq_valid && rq_valid) pick_wr = !last_wr;
    else                      pick_wr = wq_valid;
    adm_req  = slot_free && (wq_valid || rq_valid);
    adm_is_wr = pick_wr;
    adm_tid  = pick_wr ? wq.id : rq.id;
    adm_size = pick_wr ? resp_size(MSG_WR_REQ, wq.len) : resp_size(MSG_RD_REQ, rq.len);
    wq_pop   = adm_req && adm_grant && pick_wr;
    rq_pop   = adm_req && adm_grant && !pick_wr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      msg_valid <= 1'b0;
      last_wr   <= 1'b0;
      msg       <= '0;
    end else begin
      if (adm_req) last_wr <= pick_wr;
      if (adm_req && adm_grant) begin
        msg_valid  <= 1'b1;
        msg.mtype  <= pick_wr ? MSG_WR_REQ : MSG_RD_REQ;
        msg.tid    <= adm_tid;
        msg.seq    <= adm_seq;
        msg.addr   <= pick_wr ? wq.addr : rq.addr;
        msg.len    <= pick_wr ? wq.len : rq.len;
      end else if (msg_ready) begin
        msg_valid <= 1'b0;
      end
    end
  end
endmodule
