// status_table: the status register and status table of the master-side
// reorder unit, together with the admittance bookkeeping (size_aom).
// Row format and update rules follow the document; see the end of this
// comment for this design's own additions.
//
// The status register has one bit per AXI transaction ID; it is set while at
// least one message of that ID is in the network. A status-table row
// {v, T-ID, N-T, E-S} is opened when a second message of an ID is admitted
// while the first is still outstanding: N-T counts the outstanding messages
// of the ID and E-S is the sequence number of the response expected next.
//
// Forward path (admittance, combinational answer in the request's cycle):
//  - status bit clear: the message is the only one of its ID, it is always
//    admitted with sequence number 0 and only sets the bit;
//  - otherwise the sequence number is N-T + E-S (N-T taken as 1 when the row
//    is new), N-T is incremented, and the response's size is added to
//    size_aom. Such a message is admitted only if size_aom plus its size
//    fits the reorder buffer, a row is available, N-T is below 2^SEQ_W and
//    fewer than RT_ROWS reserved messages are outstanding, so an out-of-order
//    response always finds room in the reorder table and buffer.
// Reverse path: lk_inorder tells the packet queue whether a response with
// (lk_tid, lk_seq) is the expected one (always so for an ID without a row).
// When the depacketizer accepts a packet's head (dlv_head) the row's E-S is
// incremented and N-T decremented; at N-T = 0 the row and the status bit are
// cleared, and an ID without a row just clears its bit. The reserved size of
// a delivered response is returned to size_aom when its tail has been
// accepted (dlv_tail). The oldest message of a row reserved nothing, which a
// per-row flag (hu) remembers.
// The row format, the update rules and the size_aom comparison follow the
// document. The extra admittance conditions, returning space at the tail,
// and refusing admittance in a cycle that commits a delivery (one table
// update per cycle) are this design's own.
module status_table
  import noc_pkg::*;
#(
  parameter int ST_ROWS  = 8,
  parameter int RB_DEPTH = 48,
  parameter int RT_ROWS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  // admittance
  input  logic               adm_req,
  input  logic [TID_W-1:0]   adm_tid,
  input  logic [SIZE_W-1:0]  adm_size,
  output logic               adm_grant,
  output logic [SEQ_W-1:0]   adm_seq,
  // in-order lookup for an arriving response
  input  logic [TID_W-1:0]   lk_tid,
  input  logic [SEQ_W-1:0]   lk_seq,
  output logic               lk_inorder,
  // delivery to the depacketizer
  input  logic               dlv_head,
  input  logic [TID_W-1:0]   dlv_tid,
  input  logic [SIZE_W-1:0]  dlv_size,
  input  logic               dlv_tail,
  // expected sequence number per ID, for the reorder buffer's release
  output logic [NUM_TID-1:0] exp_valid,
  output logic [SEQ_W-1:0]   exp_seq [NUM_TID],
  // status
  output logic [NUM_TID-1:0] status_reg,
  output logic [$clog2(RB_DEPTH+1)-1:0] size_aom,
  output logic [$clog2(RT_ROWS+1)-1:0]  resv_cnt
);
  localparam int RW = $clog2(ST_ROWS);
  localparam int AOMW = $clog2(RB_DEPTH+1);
  localparam int RCW  = $clog2(RT_ROWS+1);

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    logic [SEQ_W:0]   nt;
    logic [SEQ_W-1:0] es;
    logic             hu;   // oldest outstanding message reserved no space
  } row_t;

  row_t rows [ST_ROWS];

  // pending return of reserved space, applied at the delivered packet's tail
  logic [SIZE_W-1:0] pend_amt;
  logic              pend_resv;

  // ---------------- lookups ----------------
  function automatic logic [RW:0] find(input row_t tbl [ST_ROWS], input logic [TID_W-1:0] t);
    logic [RW:0] res;
    res = '0;
    for (int i = ST_ROWS - 1; i >= 0; i--)
      if (tbl[i].v && tbl[i].tid == t) res = {1'b1, RW'(i)};
    return res;
  endfunction

  logic [RW:0] a_hit, l_hit, d_hit;
  logic [RW:0] free_row;
  logic        fits;

  always_comb begin
    a_hit = find(rows, adm_tid);
    l_hit = find(rows, lk_tid);
    d_hit = find(rows, dlv_tid);
    free_row = '0;
    for (int i = ST_ROWS - 1; i >= 0; i--)
      if (!rows[i].v) free_row = {1'b1, RW'(i)};
    for (int t = 0; t < NUM_TID; t++) begin
      exp_valid[t] = 1'b0;
      exp_seq[t]   = '0;
      for (int i = 0; i < ST_ROWS; i++)
        if (rows[i].v && rows[i].tid == TID_W'(t)) begin
          exp_valid[t] = 1'b1;
          exp_seq[t]   = rows[i].es;
        end
    end
  end

  always_comb begin
    fits      = ({1'b0, size_aom} + (AOMW+1)'(adm_size) <= (AOMW+1)'(RB_DEPTH))
                && (resv_cnt < RCW'(RT_ROWS));
    adm_grant = 1'b0;
    adm_seq   = '0;
    if (adm_req && !dlv_head) begin
      if (!status_reg[adm_tid]) begin
        adm_grant = 1'b1;
        adm_seq   = '0;
      end else if (a_hit[RW]) begin
        adm_grant = fits && (rows[a_hit[RW-1:0]].nt < (SEQ_W+1)'(1 << SEQ_W));
        adm_seq   = rows[a_hit[RW-1:0]].nt[SEQ_W-1:0] + rows[a_hit[RW-1:0]].es;
      end else begin
        adm_grant = fits && free_row[RW];
        adm_seq   = SEQ_W'(1);
      end
    end
    lk_inorder = l_hit[RW] ? (lk_seq == rows[l_hit[RW-1:0]].es) : 1'b1;
  end

  // ---------------- updates ----------------
  logic [SIZE_W-1:0] ret_amt;
  logic              ret_resv;
  logic [SIZE_W-1:0] add_amt;
  logic              add_resv;

  always_comb begin
    // amount handed back this cycle
    ret_amt  = '0;
    ret_resv = 1'b0;
    if (dlv_tail) begin
      if (dlv_head) begin
        if (d_hit[RW] && !rows[d_hit[RW-1:0]].hu) begin
          ret_amt  = dlv_size;
          ret_resv = 1'b1;
        end
      end else begin
        ret_amt  = pend_amt;
        ret_resv = pend_resv;
      end
    end
    add_amt  = '0;
    add_resv = 1'b0;
    if (adm_grant && status_reg[adm_tid]) begin
      add_amt  = adm_size;
      add_resv = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      status_reg <= '0;
      size_aom   <= '0;
      resv_cnt   <= '0;
      pend_amt   <= '0;
      pend_resv  <= 1'b0;
      for (int i = 0; i < ST_ROWS; i++) rows[i] <= '0;
    end else begin
      size_aom <= size_aom + AOMW'(add_amt) - AOMW'(ret_amt);
      resv_cnt <= resv_cnt + RCW'(add_resv) - RCW'(ret_resv);
      if (adm_grant) begin
        if (!status_reg[adm_tid]) begin
          status_reg[adm_tid] <= 1'b1;                       // Fig. 3(a)
        end else if (a_hit[RW]) begin
          rows[a_hit[RW-1:0]].nt <= rows[a_hit[RW-1:0]].nt + 1'b1;   // Fig. 3(c)
        end else begin
          rows[free_row[RW-1:0]] <= '{v: 1'b1, tid: adm_tid,
                                      nt: (SEQ_W+1)'(2), es: '0, hu: 1'b1}; // Fig. 3(b)
        end
      end
      if (dlv_head) begin
        if (d_hit[RW]) begin
          rows[d_hit[RW-1:0]].es <= rows[d_hit[RW-1:0]].es + 1'b1;  // Fig. 3(d)
          rows[d_hit[RW-1:0]].nt <= rows[d_hit[RW-1:0]].nt - 1'b1;
          rows[d_hit[RW-1:0]].hu <= 1'b0;
          if (rows[d_hit[RW-1:0]].nt == (SEQ_W+1)'(1)) begin         // Fig. 3(e)
            rows[d_hit[RW-1:0]].v <= 1'b0;
            status_reg[dlv_tid]   <= 1'b0;
          end
          if (!dlv_tail) begin
            pend_amt  <= rows[d_hit[RW-1:0]].hu ? '0 : dlv_size;
            pend_resv <= !rows[d_hit[RW-1:0]].hu;
          end
        end else begin
          status_reg[dlv_tid] <= 1'b0;
          if (!dlv_tail) begin
            pend_amt  <= '0;
            pend_resv <= 1'b0;
          end
        end
      end
    end
  end

  // a delivery is only ever reported for an ID that is outstanding
  a_dlv_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    dlv_head |-> status_reg[dlv_tid]);
  a_aom_bound: assert property (@(posedge clk) disable iff (!rst_n)
    size_aom <= AOMW'(RB_DEPTH));
endmodule
