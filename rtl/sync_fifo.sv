// sync_fifo: single-clock first-in first-out buffer used for the request,
// data, packet and response buffers of both network interfaces.
//
// DEPTH entries of type T held in a register array with binary read and write
// pointers and an occupancy counter. Interface: valid/ready on both sides; a
// word written in one cycle can be read in the next (no fall-through).
// Pushing and popping in the same cycle is allowed when full.
// A generic helper of this design's own; the document's buffers (request,
// data and packet buffers) are built from it.
module sync_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign out_valid = (count != 0);
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end
endmodule
