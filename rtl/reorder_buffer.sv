// reorder_buffer: the reorder table and the shared reorder buffer of the
// master-side reorder unit (dynamic buffer allocation).
//
// The buffer has RB_DEPTH slots; each holds one flit and a pointer to the
// slot of the packet's next flit, so a stored packet is a linked list and
// packets of any length share the slots. The reorder table has one row per
// stored out-of-order packet: {v, T-ID, S-N, P}, P pointing at the slot of
// the packet's head flit.
// Store side (st_*): each accepted flit goes to the lowest free slot, one
// flit per cycle. A head flit opens a table row with the T-ID and sequence
// number read from its header; each later flit is linked from the previous
// one; the tail marks the row complete. The admittance rules of the status
// table guarantee room, so st_ready only drops if that guarantee is broken.
// Release side (rel_*): when no release is running, a complete row whose S-N
// equals the expected sequence number of its T-ID (exp_valid/exp_seq from
// the status table) is chosen, its row is freed and, from the next cycle on,
// its flits are sent out one per cycle following the links, each slot freed
// as its flit is accepted.
// Table fields, pointer-linked slots and the release rule follow the
// document; lowest-free-slot allocation and releasing only complete packets
// are this design's own.
module reorder_buffer
  import noc_pkg::*;
#(
  parameter int RB_DEPTH = 48,
  parameter int RT_ROWS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic  st_valid,
  output logic  st_ready,
  input  flit_t st_flit,
  input  logic [NUM_TID-1:0] exp_valid,
  input  logic [SEQ_W-1:0]   exp_seq [NUM_TID],
  output logic  rel_valid,
  input  logic  rel_ready,
  output flit_t rel_flit,
  output logic [$clog2(RB_DEPTH+1)-1:0] used_slots,
  output logic [$clog2(RT_ROWS+1)-1:0]  used_rows
);
  localparam int PW = $clog2(RB_DEPTH);
  localparam int TW = $clog2(RT_ROWS);

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    logic [SEQ_W-1:0] sn;
    logic [PW-1:0]    p;
    logic             done;
  } rt_row_t;

  rt_row_t       rt [RT_ROWS];
  flit_t         slot_flit [RB_DEPTH];
  logic [PW-1:0] slot_next [RB_DEPTH];
  logic [RB_DEPTH-1:0] used;

  logic [TW-1:0] wr_row;
  logic [PW-1:0] wr_prev;
  logic          rd_active;
  logic [PW-1:0] rd_ptr;

  logic [PW:0] free_slot;
  logic [TW:0] free_row;
  logic [TW:0] match_row;
  hdr_t        st_hdr;
  logic        st_fire, rel_fire;

  always_comb begin
    free_slot = '0;
    for (int i = RB_DEPTH - 1; i >= 0; i--)
      if (!used[i]) free_slot = {1'b1, PW'(i)};
    free_row  = '0;
    match_row = '0;
    for (int i = RT_ROWS - 1; i >= 0; i--) begin
      if (!rt[i].v) free_row = {1'b1, TW'(i)};
      if (rt[i].v && rt[i].done && exp_valid[rt[i].tid] && exp_seq[rt[i].tid] == rt[i].sn)
        match_row = {1'b1, TW'(i)};
    end
    st_hdr    = data2hdr(st_flit.data);
    st_ready  = free_slot[PW] && (!st_flit.head || free_row[TW]);
    st_fire   = st_valid && st_ready;
    rel_valid = rd_active;
    rel_flit  = slot_flit[rd_ptr];
    rel_fire  = rel_valid && rel_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used      <= '0;
      wr_row    <= '0;
      wr_prev   <= '0;
      rd_active <= 1'b0;
      rd_ptr    <= '0;
      for (int i = 0; i < RT_ROWS; i++) rt[i] <= '0;
    end else begin
      // store
      if (st_fire) begin
        used[free_slot[PW-1:0]] <= 1'b1;
        wr_prev <= free_slot[PW-1:0];
        if (st_flit.head) begin
          rt[free_row[TW-1:0]] <= '{v: 1'b1, tid: st_hdr.tid, sn: st_hdr.seq,
                                    p: free_slot[PW-1:0], done: st_flit.tail};
          wr_row <= free_row[TW-1:0];
        end else if (st_flit.tail) begin
          rt[wr_row].done <= 1'b1;
        end
      end
      // release
      if (!rd_active) begin
        if (match_row[TW]) begin
          rd_active <= 1'b1;
          rd_ptr    <= rt[match_row[TW-1:0]].p;
          rt[match_row[TW-1:0]].v <= 1'b0;
        end
      end else if (rel_fire) begin
        used[rd_ptr] <= 1'b0;
        if (rel_flit.tail) rd_active <= 1'b0;
        else               rd_ptr    <= slot_next[rd_ptr];
      end
    end
  end

  // slot contents and links: no reset needed, written before they are read
  always_ff @(posedge clk) begin
    if (st_fire) begin
      slot_flit[free_slot[PW-1:0]] <= st_flit;
      if (!st_flit.head) slot_next[wr_prev] <= free_slot[PW-1:0];
    end
  end

  always_comb begin
    used_slots = '0;
    for (int i = 0; i < RB_DEPTH; i++) used_slots += used[i];
    used_rows = '0;
    for (int i = 0; i < RT_ROWS; i++) used_rows += rt[i].v;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    st_valid |-> st_ready);
endmodule
