// axi_mem_model: behavioural model of a slave memory core on AXI, for
// testbenches only. Requests (AW or AR) are queued in arrival order and
// answered strictly in that order, after a random delay of up to MAX_DELAY
// cycles. Reads return the pattern pat(addr) for each beat address
// (addr + 4*beat), with resp = {1'b0, addr[2]}. Writes take len+1 W beats,
// whose data must equal pat(beat address) and whose last flag must mark the
// final beat (otherwise errors counts up), then return a B with resp
// {1'b0, addr[2]}.
// The memory is not part of the design; this model and its data pattern
// are test scaffolding of this design's own.
module axi_mem_model
  import noc_pkg::*;
#(
  parameter int MAX_DELAY = 3,
  parameter int SEED      = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   aw_valid,
  output logic   aw_ready,
  input  axi_a_t aw,
  input  logic   w_valid,
  output logic   w_ready,
  input  axi_w_t w,
  input  logic   ar_valid,
  output logic   ar_ready,
  input  axi_a_t ar,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b,
  output int     errors,
  output int     n_reads,
  output int     n_writes
);
  function automatic logic [31:0] pat(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  typedef struct packed {
    logic   is_wr;
    axi_a_t a;
  } req_t;

  req_t q [$];
  int   delay, beat;
  logic busy;
  req_t cur;
  int   rng;

  assign aw_ready = 1'b1;
  assign ar_ready = 1'b1;

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      busy     <= 1'b0;
      r_valid  <= 1'b0;
      b_valid  <= 1'b0;
      w_ready  <= 1'b0;
      errors   <= 0;
      n_reads  <= 0;
      n_writes <= 0;
      delay    <= 0;
      beat     <= 0;
      r        <= '0;
      b        <= '0;
      rng      <= SEED;
    end else begin
      if (aw_valid) q.push_back('{1'b1, aw});
      if (ar_valid) q.push_back('{1'b0, ar});
      if (!busy) begin
        if (q.size() > 0) begin
          cur   = q.pop_front();
          busy  <= 1'b1;
          beat  <= 0;
          delay <= $urandom_range(0, MAX_DELAY);
          w_ready <= 1'b0;
        end
      end else if (delay > 0) begin
        delay <= delay - 1;
      end else if (cur.is_wr) begin
        if (!b_valid) begin
          w_ready <= 1'b1;
          if (w_valid && w_ready) begin
            if (w.data != pat(cur.a.addr + 32'(4 * beat))) errors <= errors + 1;
            if (w.last != (beat == int'(cur.a.len)))       errors <= errors + 1;
            beat <= beat + 1;
            if (beat == int'(cur.a.len)) begin
              w_ready <= 1'b0;
              b_valid <= 1'b1;
              b       <= '{id: cur.a.id, resp: {1'b0, cur.a.addr[2]}};
            end
          end
        end else if (b_ready) begin
          b_valid  <= 1'b0;
          busy     <= 1'b0;
          n_writes <= n_writes + 1;
        end
      end else begin
        if (!r_valid || r_ready) begin
          if (r_valid && r.last) begin
            r_valid <= 1'b0;
            busy    <= 1'b0;
            n_reads <= n_reads + 1;
          end else begin
            r_valid <= 1'b1;
            r <= '{id: cur.a.id, data: pat(cur.a.addr + 32'(4 * beat)),
                   resp: {1'b0, cur.a.addr[2]}, last: (beat == int'(cur.a.len))};
            beat <= beat + 1;
          end
        end
      end
    end
  end
endmodule
