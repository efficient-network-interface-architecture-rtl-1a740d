// packetizer_s: the slave-side packetizer. When the oldest request header
// (from the header FIFO) and the first beat of its response are both there,
// the adapted response header is loaded into the header register, with the
// response code of that beat. The flit controller then sends the head flit;
// a write response ends there (head and tail in one flit, the B beat is
// consumed with it), a read response follows with len+1 data flits taken
// one per cycle from the read-data buffer, the last carrying the tail mark.
// The header FIFO is popped with the packet's last flit. The packet length is
// taken from the request header, so it matches the space the master
// reserved. Adapter, registers and flit control follow the document's
// slave-NI diagram; the sequencing is this design's own.
module packetizer_s
  import noc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  input  logic      hdr_valid,
  input  hdr_t      hdr,
  output logic      hdr_pop,
  input  logic      rsp_valid,
  output logic      rsp_ready,
  input  rsp_beat_t rsp,
  output logic      resp_valid,
  input  logic      resp_ready,
  output flit_t     resp_flit
);
  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_DATA} state_t;
  state_t state;
  hdr_t   hdr_reg, adapted;
  logic [LEN_W-1:0] beat;

  // adapter: destination = the request's source node, source = this node,
  // type = read or write response, T-ID, Seq and len kept, resp from the slave
  always_comb begin
    adapted       = hdr;
    adapted.dst_x = hdr.src_x;
    adapted.dst_y = hdr.src_y;
    adapted.src_x = node_x;
    adapted.src_y = node_y;
    adapted.mtype = (hdr.mtype == MSG_WR_REQ) ? MSG_WR_RESP : MSG_RD_RESP;
    adapted.resp  = rsp.resp;
  end

  always_comb begin
    resp_valid = 1'b0;
    resp_flit  = '0;
    rsp_ready  = 1'b0;
    hdr_pop    = 1'b0;
    unique case (state)
      S_HEAD: begin
        resp_valid     = 1'b1;
        resp_flit.head = 1'b1;
        resp_flit.tail = (hdr_reg.mtype == MSG_WR_RESP);
        resp_flit.data = hdr2data(hdr_reg);
        rsp_ready      = resp_ready && (hdr_reg.mtype == MSG_WR_RESP);
        hdr_pop        = resp_ready && (hdr_reg.mtype == MSG_WR_RESP);
      end
      S_DATA: begin
        resp_valid     = rsp_valid;
        resp_flit.tail = (beat == hdr_reg.len);
        resp_flit.data = rsp.data;
        rsp_ready      = resp_ready;
        hdr_pop        = resp_ready && rsp_valid && (beat == hdr_reg.len);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hdr_reg <= '0;
      beat    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (hdr_valid && rsp_valid) begin
          hdr_reg <= adapted;
          state   <= S_HEAD;
        end
        S_HEAD: if (resp_ready) begin
          beat  <= '0;
          state <= (hdr_reg.mtype == MSG_WR_RESP) ? S_IDLE : S_DATA;
        end
        S_DATA: if (resp_ready && rsp_valid) begin
          beat <= beat + 1'b1;
          if (beat == hdr_reg.len) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
