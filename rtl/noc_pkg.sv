// noc_pkg: types and constants shared by the master-side and slave-side
// network interfaces (NIs).
//
// A flit is 32 data bits plus two sideband marks, head and tail. The head flit
// of every packet carries a packed header: destination and source mesh
// coordinates, the message type, the AXI transaction ID (T-ID, 4 bits), the
// sequence number given by the master's reorder unit (3 bits), the AXI burst
// length minus one (3 bits, bursts of 1..8 beats) and a 2-bit response code.
// Request packets carry the 32-bit address in the second flit and, for a
// write, one data beat per following flit. A read response is the head flit
// plus one flit per data beat; a write response is the head flit alone.
// The flit width, T-ID and sequence widths and the 5x5 mesh follow the
// evaluated configuration; the field layout is this design's own.
package noc_pkg;

  localparam int FLIT_W  = 32;
  localparam int DATA_W  = 32;
  localparam int ADDR_W  = 32;
  localparam int TID_W   = 4;
  localparam int SEQ_W   = 3;
  localparam int LEN_W   = 3;
  localparam int COORD_W = 3;
  localparam int NUM_TID = 1 << TID_W;
  // largest packet a response can need: head + 8 data flits
  localparam int SIZE_W  = 4;

  typedef enum logic [1:0] {
    MSG_RD_REQ  = 2'd0,
    MSG_WR_REQ  = 2'd1,
    MSG_RD_RESP = 2'd2,
    MSG_WR_RESP = 2'd3
  } msg_t;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    msg_t               mtype;
    logic [TID_W-1:0]   tid;
    logic [SEQ_W-1:0]   seq;
    logic [LEN_W-1:0]   len;
    logic [1:0]         resp;
  } hdr_t;

  localparam int HDR_W = $bits(hdr_t);

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // AXI channel subset: INCR bursts of full-width beats.
  typedef struct packed {
    logic [TID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } axi_a_t;   // used for both AW and AR

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [TID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [TID_W-1:0] id;
    logic [1:0]       resp;
  } axi_b_t;

  // request message handed from the AXI queue to the packetizer
  typedef struct packed {
    msg_t              mtype;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  seq;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } req_msg_t;

  // response beat handed from the slave AXI queue to the packetizer
  typedef struct packed {
    logic              is_wr;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
  } rsp_beat_t;

  function automatic logic [FLIT_W-1:0] hdr2data(hdr_t h);
    return FLIT_W'(h);
  endfunction

  function automatic hdr_t data2hdr(logic [FLIT_W-1:0] d);
    return hdr_t'(d[HDR_W-1:0]);
  endfunction

  // Flits of the response a request of this type and length will receive.
  function automatic logic [SIZE_W-1:0] resp_size(msg_t req_type, logic [LEN_W-1:0] len);
    if (req_type == MSG_RD_REQ) return SIZE_W'(len) + SIZE_W'(2);
    else                        return SIZE_W'(1);
  endfunction

  // Flits of a response packet, from its own header.
  function automatic logic [SIZE_W-1:0] pkt_size(hdr_t h);
    if (h.mtype == MSG_RD_RESP) return SIZE_W'(h.len) + SIZE_W'(2);
    else                        return SIZE_W'(1);
  endfunction

endpackage
