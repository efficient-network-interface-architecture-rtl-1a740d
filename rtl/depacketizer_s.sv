// depacketizer_s: the slave-side depacketizer. It restores a request packet
// into AXI channels for the slave core: the head flit is consumed and its
// control bits (type, T-ID, burst length) kept in registers; the address flit
// becomes one AR beat (read) or AW beat (write); for a write each following
// data flit becomes a W beat, with last on the packet's tail. The AXI id is
// the request's T-ID. One flit per cycle when the slave is ready. The
// register set (control bits, read address, write address, write data)
// follows the document's slave-NI diagram; the sequencing is this design's.
module depacketizer_s
  import noc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic   aw_valid,
  input  logic   aw_ready,
  output axi_a_t aw,
  output logic   w_valid,
  input  logic   w_ready,
  output axi_w_t w,
  output logic   ar_valid,
  input  logic   ar_ready,
  output axi_a_t ar
);
  typedef enum logic [1:0] {S_HEAD, S_ADDR, S_DATA} state_t;
  state_t state;
  msg_t             ctrl_type;
  logic [TID_W-1:0] ctrl_tid;
  logic [LEN_W-1:0] ctrl_len;
  hdr_t             h;

  always_comb begin
    h        = data2hdr(in_flit.data);
    in_ready = 1'b0;
    aw_valid = 1'b0;
    ar_valid = 1'b0;
    w_valid  = 1'b0;
    aw       = '{id: ctrl_tid, addr: in_flit.data, len: ctrl_len};
    ar       = aw;
    w        = '{data: in_flit.data, last: in_flit.tail};
    unique case (state)
      S_HEAD: in_ready = 1'b1;
      S_ADDR: if (ctrl_type == MSG_WR_REQ) begin
        aw_valid = in_valid;
        in_ready = aw_ready;
      end else begin
        ar_valid = in_valid;
        in_ready = ar_ready;
      end
      S_DATA: begin
        w_valid  = in_valid;
        in_ready = w_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_HEAD;
      ctrl_type <= MSG_RD_REQ;
      ctrl_tid  <= '0;
      ctrl_len  <= '0;
    end else if (in_valid && in_ready) begin
      unique case (state)
        S_HEAD: if (in_flit.head) begin
          ctrl_type <= h.mtype;
          ctrl_tid  <= h.tid;
          ctrl_len  <= h.len;
          state     <= S_ADDR;
        end
        S_ADDR: state <= in_flit.tail ? S_HEAD : S_DATA;
        S_DATA: if (in_flit.tail) state <= S_HEAD;
        default: state <= S_HEAD;
      endcase
    end
  end
endmodule
