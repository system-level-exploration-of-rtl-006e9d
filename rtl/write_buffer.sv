// Write buffer between the L1 data cache and the L2.
//
// A small FIFO of dirty lines that were evicted from the STT-MRAM array (or
// written back from the VWB when the DL1 no longer holds them). It lets an
// eviction complete without waiting for the L2, and drains one line at a
// time to the L2 whenever the L2 port is free.
//
// Interface: `push_i` with `push_laddr_i`/`push_data_i` enqueues a line when
// `full_o` is low; the head is offered on `head_*` and leaves on `pop_i`.
// `match_o` reports whether any queued line has the address `lk_laddr_i`,
// so that a refill from L2 of that line can wait until it has drained.
// Push and pop may happen on the same edge.
//
// The document names a small write buffer for evicted data; its depth (4)
// and the address match are this design's choices.
module write_buffer
  import dl1_pkg::*;
#(
  parameter int unsigned DEPTH = WB_DEPTH,
  localparam int unsigned PB   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_i,
  input  laddr_t push_laddr_i,
  input  line_t  push_data_i,
  output logic   full_o,
  output logic   empty_o,
  output laddr_t head_laddr_o,
  output line_t  head_data_o,
  input  logic   pop_i,
  input  laddr_t lk_laddr_i,
  output logic   match_o
);

  line_t         data_q  [DEPTH];
  laddr_t        laddr_q [DEPTH];
  logic          valid_q [DEPTH];
  logic [PB-1:0] rd_q, wr_q;
  logic [PB:0]   count_q;

  assign full_o       = (count_q == (PB+1)'(DEPTH));
  assign empty_o      = (count_q == '0);
  assign head_laddr_o = laddr_q[rd_q];
  assign head_data_o  = data_q[rd_q];

  always_comb begin
    match_o = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++)
      if (valid_q[i] && laddr_q[i] == lk_laddr_i) match_o = 1'b1;
  end

  function automatic logic [PB-1:0] inc(logic [PB-1:0] p);
    return (p == PB'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      count_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        valid_q[i] <= 1'b0;
        laddr_q[i] <= '0;
      end
    end else begin
      if (do_pop) begin
        valid_q[rd_q] <= 1'b0;
        rd_q          <= inc(rd_q);
      end
      if (do_push) begin
        valid_q[wr_q] <= 1'b1;
        laddr_q[wr_q] <= push_laddr_i;
        wr_q          <= inc(wr_q);
      end
      count_q <= count_q + (PB+1)'(do_push) - (PB+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) data_q[wr_q] <= push_data_i;
  end

  // Rules of the queue interface.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o))
    else $error("write_buffer: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o))
    else $error("write_buffer: pop while empty");

endmodule
