// header_fifo: the slave NI's header FIFO. It keeps the header of every
// request that has entered the slave core (source node, T-ID, sequence
// number, type, burst length) until the matching response is packetized, so
// responses leave with the right header as long as the slave answers in
// request order. DEPTH headers in a register ring with push/pop and
// full/empty flags; a pushed header is visible at dout the next cycle.
// Pushing into a full FIFO or popping an empty one is ignored.
// Its role follows the document; depth and flags are this design's choice.
module header_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  hdr_t din,
  output logic full,
  input  logic pop,
  output hdr_t dout,
  output logic empty
);
  localparam int AW = $clog2(DEPTH);
  hdr_t          ring [DEPTH];
  logic [AW-1:0] head, tail;
  logic [AW:0]   n;
  logic          do_push, do_pop;

  assign full    = (n == (AW+1)'(DEPTH));
  assign empty   = (n == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = ring[head];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      n    <= '0;
    end else begin
      if (do_push) tail <= (tail == AW'(DEPTH-1)) ? '0 : tail + 1'b1;
      if (do_pop)  head <= (head == AW'(DEPTH-1)) ? '0 : head + 1'b1;
      n <= n + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) ring[tail] <= din;
endmodule
