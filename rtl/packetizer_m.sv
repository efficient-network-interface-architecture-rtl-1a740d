// packetizer_m: the master-side packetizer. It turns an admitted request
// message into a packet of flits for the router.
//
// The header builder loads the message's address bits, control bits (message
// type and burst length), T-ID and sequence number into registers, and the
// mapping unit (addr_mapper) turns the address into the destination's mesh
// coordinates. Write data beats pass through a data buffer. The flit
// controller then sends the head flit, the address flit and, for a write,
// len+1 data flits, one per cycle while the router accepts (req_ready); the
// last flit carries the tail mark. A read request is two flits, a write
// request len+3. This structure follows the document; the flit layout and
// the one-message-at-a-time sequencing are this design's own.
module packetizer_m
  import noc_pkg::*;
#(
  parameter int DBUF_DEPTH = 8,
  parameter int MESH_X     = 5,
  parameter int MESH_Y     = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  input  logic     msg_valid,
  output logic     msg_ready,
  input  req_msg_t msg,
  input  logic     wd_valid,
  output logic     wd_ready,
  input  axi_w_t   wd,
  output logic     req_valid,
  input  logic     req_ready,
  output flit_t    req_flit,
  output logic     map_err
);
  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_ADDR, S_DATA} state_t;
  state_t state;

  // header builder registers
  logic [ADDR_W-1:0]  addr_bits;
  logic [COORD_W-1:0] noc_x, noc_y;
  msg_t               ctrl_type;
  logic [LEN_W-1:0]   ctrl_len;
  logic [TID_W-1:0]   tran_id;
  logic [SEQ_W-1:0]   seq_num;
  logic [LEN_W-1:0]   beat;

  logic [COORD_W-1:0] map_x, map_y;
  logic               map_e;
  hdr_t               hdr;

  logic   db_valid, db_ready;
  axi_w_t db;

  addr_mapper #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_map (
    .addr(msg.addr), .x(map_x), .y(map_y), .err(map_e));

  sync_fifo #(.T(axi_w_t), .DEPTH(DBUF_DEPTH)) u_dbuf (
    .clk, .rst_n, .in_valid(wd_valid), .in_ready(wd_ready), .in_data(wd),
    .out_valid(db_valid), .out_ready(db_ready), .out_data(db), .count());

  assign msg_ready = (state == S_IDLE);

  always_comb begin
    hdr       = '0;
    hdr.dst_x = noc_x;
    hdr.dst_y = noc_y;
    hdr.src_x = node_x;
    hdr.src_y = node_y;
    hdr.mtype = ctrl_type;
    hdr.tid   = tran_id;
    hdr.seq   = seq_num;
    hdr.len   = ctrl_len;
    req_valid = 1'b0;
    req_flit  = '0;
    db_ready  = 1'b0;
    unique case (state)
      S_HEAD: begin
        req_valid     = 1'b1;
        req_flit.head = 1'b1;
        req_flit.data = hdr2data(hdr);
      end
      S_ADDR: begin
        req_valid     = 1'b1;
        req_flit.tail = (ctrl_type == MSG_RD_REQ);
        req_flit.data = addr_bits;
      end
      S_DATA: begin
        req_valid     = db_valid;
        req_flit.tail = (beat == ctrl_len);
        req_flit.data = db.data;
        db_ready      = req_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_bits <= '0;
      noc_x     <= '0;
      noc_y     <= '0;
      ctrl_type <= MSG_RD_REQ;
      ctrl_len  <= '0;
      tran_id   <= '0;
      seq_num   <= '0;
      beat      <= '0;
      map_err   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (msg_valid) begin
          addr_bits <= msg.addr;
          noc_x     <= map_x;
          noc_y     <= map_y;
          map_err   <= map_e;
          ctrl_type <= msg.mtype;
          ctrl_len  <= msg.len;
          tran_id   <= msg.tid;
          seq_num   <= msg.seq;
          state     <= S_HEAD;
        end
        S_HEAD: if (req_ready) state <= S_ADDR;
        S_ADDR: if (req_ready) begin
          beat  <= '0;
          state <= (ctrl_type == MSG_RD_REQ) ? S_IDLE : S_DATA;
        end
        S_DATA: if (req_ready && db_valid) begin
          beat <= beat + 1'b1;
          if (beat == ctrl_len) state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
