// One bank of the STT-MRAM data array of the L1 data cache.
//
// The bank is single ported and line wide (512 bits). Its interface is
// SRAM-like, but an access keeps the bank busy for several cycles, because
// STT-MRAM reads are slow: a read takes READ_CYCLES (4) cycles and a write
// WRITE_CYCLES (2) cycles at 1 GHz, i.e. 3.37 ns and 1.86 ns rounded up.
//
// Protocol: `req_i` is taken in a cycle where `busy_o` is low. An access
// occupies the bank for READ_CYCLES or WRITE_CYCLES cycles counting the
// request cycle: a read requested in cycle t returns `rdata_o` with a
// one-cycle `rvalid_o` pulse in cycle t+READ_CYCLES, the first cycle in
// which the bank takes a new request. A write stores the words enabled in
// `wmask_i` (one bit per 32-bit word) at the end of the request cycle and
// keeps the bank busy for the following WRITE_CYCLES-1 cycles.
//
// The cell array is modelled as a plain array with these latencies; the
// latencies and the line width follow the original proposal, the word-masked write
// and the handshake are this design's choices.
module stt_mram_bank
  import dl1_pkg::*;
#(
  parameter int unsigned ROWS         = ROWS_PER_BANK,
  parameter int unsigned RD_CYCLES    = READ_CYCLES,
  parameter int unsigned WR_CYCLES    = WRITE_CYCLES,
  localparam int unsigned RB          = $clog2(ROWS),
  localparam int unsigned CNT_BITS    = $clog2(((RD_CYCLES > WR_CYCLES) ? RD_CYCLES : WR_CYCLES) + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_i,
  input  logic                      we_i,
  input  logic [RB-1:0]             row_i,
  input  line_t                     wdata_i,
  input  logic [WORDS_PER_LINE-1:0] wmask_i,
  output logic                      busy_o,
  output logic                      rvalid_o,
  output line_t                     rdata_o
);

  line_t               mem [ROWS];
  logic [CNT_BITS-1:0] cnt_q;
  logic                rd_q;
  logic [RB-1:0]       row_q;
  logic                accept;

  assign busy_o = (cnt_q != '0);
  assign accept = req_i && !busy_o;

  // A request in cycle t keeps the bank busy in cycles t+1 .. t+N-1 (N is
  // the read or write time); read data arrives in cycle t+N, when the bank
  // can take the next request.
  logic rd_now;   // single-cycle read: data straight after the request
  assign rd_now = accept && !we_i && (RD_CYCLES == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      rd_q     <= 1'b0;
      row_q    <= '0;
      rvalid_o <= 1'b0;
    end else begin
      rvalid_o <= rd_now || (rd_q && cnt_q == CNT_BITS'(1));
      if (accept) begin
        cnt_q <= we_i ? CNT_BITS'(WR_CYCLES - 1) : CNT_BITS'(RD_CYCLES - 1);
        rd_q  <= !we_i;
        row_q <= row_i;
      end else if (busy_o) begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && we_i) begin
      for (int w = 0; w < int'(WORDS_PER_LINE); w++)
        if (wmask_i[w]) mem[row_i][w*WORD_BITS +: WORD_BITS] <= wdata_i[w*WORD_BITS +: WORD_BITS];
    end
    if (rd_now) rdata_o <= mem[row_i];
    else if (rd_q && cnt_q == CNT_BITS'(1)) rdata_o <= mem[row_q];
  end

endmodule
