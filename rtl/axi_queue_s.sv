// axi_queue_s: the slave-side AXI queue. The slave core's write responses
// and read-data beats are kept in a write-response buffer and a read-data
// buffer. Its control looks at the type of the oldest request header
// (hdr_valid, hdr_is_wr from the header FIFO) and offers the packetizer the
// next beat of that buffer only (rsp_*), so responses leave in request
// order. One beat per cycle. Buffers and mux follow the document; depths are
// this design's choice.
module axi_queue_s
  import noc_pkg::*;
#(
  parameter int BDEPTH = 4,
  parameter int RDEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic   r_valid,
  output logic   r_ready,
  input  axi_r_t r,
  input  logic   b_valid,
  output logic   b_ready,
  input  axi_b_t b,
  input  logic   hdr_valid,
  input  logic   hdr_is_wr,
  output logic      rsp_valid,
  input  logic      rsp_ready,
  output rsp_beat_t rsp
);
  logic   bq_valid, bq_ready, rq_valid, rq_ready;
  axi_b_t bq;
  axi_r_t rq;

  sync_fifo #(.T(axi_b_t), .DEPTH(BDEPTH)) u_bbuf (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b),
    .out_valid(bq_valid), .out_ready(bq_ready), .out_data(bq), .count());
  sync_fifo #(.T(axi_r_t), .DEPTH(RDEPTH)) u_rbuf (
    .clk, .rst_n, .in_valid(r_valid), .in_ready(r_ready), .in_data(r),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq), .count());

  always_comb begin
    rsp_valid = hdr_valid && (hdr_is_wr ? bq_valid : rq_valid);
    rsp.is_wr = hdr_is_wr;
    rsp.data  = hdr_is_wr ? '0 : rq.data;
    rsp.resp  = hdr_is_wr ? bq.resp : rq.resp;
    bq_ready  = hdr_valid && hdr_is_wr && rsp_ready;
    rq_ready  = hdr_valid && !hdr_is_wr && rsp_ready;
  end
endmodule
