// Behavioural model of the next memory level (L2 cache and main memory) as
// seen by the L1 data cache: a line-wide memory of unbounded size with a
// fixed read latency. Lines never written hold a pattern computed from
// their address (see init_word), so a testbench can predict them.
// A request is granted when no read is in flight (and, if BUSY_PCT is set,
// the L2 is not randomly busy); a read returns its line
// with rvalid LATENCY cycles after the grant; a write completes at the
// grant.
module l2_model
  import dl1_pkg::*;
#(
  parameter int unsigned LATENCY  = 10,
  parameter int unsigned BUSY_PCT = 0     // chance (%) that an idle L2 refuses a request
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_hold_i,   // refuse writes while set
  input  logic   req_i,
  input  logic   we_i,
  input  laddr_t laddr_i,
  input  line_t  wdata_i,
  output logic   gnt_o,
  output logic   rvalid_o,
  output line_t  rdata_o,
  output int     reads_o,
  output int     writes_o
);

  line_t  mem [laddr_t];
  int     cnt;
  laddr_t rd_la;

  `include "dl1_tb_funcs.svh"

  function automatic line_t read_line(laddr_t la);
    line_t l;
    if (mem.exists(la)) return mem[la];
    for (int w = 0; w < int'(WORDS_PER_LINE); w++) l[w*WORD_BITS +: WORD_BITS] = init_word(la, w);
    return l;
  endfunction

  logic busy_r;
  always @(posedge clk) busy_r <= ($urandom_range(99) < BUSY_PCT);
  assign gnt_o = (cnt == 0) && !busy_r && !(we_i && wr_hold_i);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= 0;
      rvalid_o <= 1'b0;
      reads_o  <= 0;
      writes_o <= 0;
      rd_la    <= '0;
    end else begin
      rvalid_o <= 1'b0;
      if (cnt > 1) cnt <= cnt - 1;
      else if (cnt == 1) begin
        cnt      <= 0;
        rvalid_o <= 1'b1;
        rdata_o  <= read_line(rd_la);
      end
      if (req_i && gnt_o) begin
        if (we_i) begin
          mem[laddr_i] = wdata_i;
          writes_o     <= writes_o + 1;
        end else begin
          cnt     <= int'(LATENCY);
          rd_la   <= laddr_i;
          reads_o <= reads_o + 1;
        end
      end
    end
  end

endmodule
