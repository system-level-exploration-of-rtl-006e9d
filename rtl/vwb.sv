// Very Wide Buffer (VWB): a small, fully associative buffer of very wide
// lines placed between the processor and the STT-MRAM data cache.
//
// The buffer holds VWB_LINES lines of VWB_LINE_BITS bits (2 x 1 Kbit by
// default), each with its own tag (the line address of the aligned
// 128-byte block it holds) and a valid bit. A VWB line spans SUBLINES
// consecutive DL1 lines; a dirty bit per DL1 line records which parts the
// processor has written, so only those are written back on eviction.
//
// Narrow side (processor): `p_addr_i` is looked up against all tags in the
// same cycle; `p_hit_o` and `p_rdata_o` are combinational, and a store
// (`p_we_i` on a hit) updates the word at the next clock edge. The word is
// selected and merged by the post-decode multiplexer.
// Wide side (data cache): `fill_start_i` claims a line for a new block (the
// line becomes invalid and takes the new tag), `fill_we_i` writes whole DL1
// lines into it, and `fill_done_i` makes it valid. `ev_*` reads a whole line
// out for write-back. Because a line being filled is invalid while the other
// lines stay valid, the processor keeps reading and writing the other lines
// while a promotion is under way.
//
// Replacement is least recently used, with invalid lines taken first. The
// fully associative tag match, the wide/narrow asymmetry, the two-line
// organisation and the per-line tag follow the original proposal; the LRU policy and
// the per-DL1-line dirty bits are this design's choices.
module vwb
  import dl1_pkg::*;
#(
  parameter int unsigned N_LINES    = VWB_LINES,
  parameter int unsigned LINE_W     = VWB_LINE_BITS,
  localparam int unsigned N_SUB     = LINE_W / LINE_BITS,
  localparam int unsigned IDX_BITS  = (N_LINES > 1) ? $clog2(N_LINES) : 1,
  localparam int unsigned WSEL_BITS = $clog2(LINE_W / WORD_BITS),
  localparam int unsigned BTAG_BITS = ADDR_BITS - $clog2(LINE_W / 8)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // narrow processor port
  input  addr_t                 p_addr_i,
  input  logic                  p_en_i,       // access this cycle (touches LRU on hit)
  input  logic                  p_we_i,       // store (takes effect on a hit)
  input  word_t                 p_wdata_i,
  output logic                  p_hit_o,
  output word_t                 p_rdata_o,
  // replacement choice
  output logic [IDX_BITS-1:0]   victim_o,
  // wide fill port
  input  logic                  fill_start_i,
  input  logic [IDX_BITS-1:0]   fill_line_i,
  input  logic [BTAG_BITS-1:0]  fill_btag_i,
  input  logic [N_SUB-1:0]      fill_we_i,
  input  logic [LINE_W-1:0]     fill_data_i,
  input  logic                  fill_done_i,
  // wide eviction read port
  input  logic [IDX_BITS-1:0]   ev_line_i,
  output logic                  ev_valid_o,
  output logic [BTAG_BITS-1:0]  ev_btag_o,
  output logic [N_SUB-1:0]      ev_dirty_o,
  output logic [LINE_W-1:0]     ev_data_o
);

  localparam int unsigned WORDS = LINE_W / WORD_BITS;

  logic [LINE_W-1:0]    data_q  [N_LINES];
  logic [BTAG_BITS-1:0] btag_q  [N_LINES];
  logic                 valid_q [N_LINES];
  logic [N_SUB-1:0]     dirty_q [N_LINES];
  logic [IDX_BITS-1:0]  age_q   [N_LINES];   // 0 = most recently used

  // ---------------- processor lookup ----------------
  logic [BTAG_BITS-1:0] p_btag;
  logic [WSEL_BITS-1:0] p_wsel;
  logic [IDX_BITS-1:0]  p_idx;
  logic [LINE_W-1:0]    merged_line;
  logic [WORDS-1:0]     word_mask;
  logic [N_SUB-1:0]     sub_mask;

  assign p_btag = p_addr_i[ADDR_BITS-1 -: BTAG_BITS];
  assign p_wsel = p_addr_i[2 +: WSEL_BITS];

  always_comb begin
    p_hit_o = 1'b0;
    p_idx   = '0;
    for (int i = 0; i < N_LINES; i++) begin
      if (valid_q[i] && btag_q[i] == p_btag) begin
        p_hit_o = 1'b1;
        p_idx   = IDX_BITS'(i);
      end
    end
  end

  vwb_post_decode_mux #(.LINE_BITS(LINE_W), .WORD_BITS(WORD_BITS)) u_mux (
    .line_i      (data_q[p_idx]),
    .word_sel_i  (p_wsel),
    .wdata_i     (p_wdata_i),
    .rdata_o     (p_rdata_o),
    .line_o      (merged_line),
    .word_mask_o (word_mask)
  );

  // DL1 line (sub-line) touched by the store
  always_comb begin
    sub_mask = '0;
    for (int s = 0; s < N_SUB; s++)
      if (|word_mask[s*WORDS_PER_LINE +: WORDS_PER_LINE]) sub_mask[s] = 1'b1;
  end

  // ---------------- replacement ----------------
  always_comb begin
    victim_o = '0;
    for (int i = N_LINES - 1; i >= 0; i--)
      if (age_q[i] == IDX_BITS'(N_LINES - 1)) victim_o = IDX_BITS'(i);
    for (int i = N_LINES - 1; i >= 0; i--)
      if (!valid_q[i]) victim_o = IDX_BITS'(i);
  end

  logic                touch;
  logic [IDX_BITS-1:0] touch_idx;
  always_comb begin
    touch     = 1'b0;
    touch_idx = '0;
    if (fill_done_i) begin
      touch     = 1'b1;
      touch_idx = fill_line_i;
    end else if (p_en_i && p_hit_o) begin
      touch     = 1'b1;
      touch_idx = p_idx;
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LINES; i++) begin
        valid_q[i] <= 1'b0;
        dirty_q[i] <= '0;
        btag_q[i]  <= '0;
        age_q[i]   <= IDX_BITS'(i);
      end
    end else begin
      if (p_en_i && p_we_i && p_hit_o) begin
        dirty_q[p_idx] <= dirty_q[p_idx] | sub_mask;
      end
      if (fill_start_i) begin
        valid_q[fill_line_i] <= 1'b0;
        dirty_q[fill_line_i] <= '0;
        btag_q[fill_line_i]  <= fill_btag_i;
      end
      if (fill_done_i) valid_q[fill_line_i] <= 1'b1;
      if (touch) begin
        for (int i = 0; i < N_LINES; i++)
          if (age_q[i] < age_q[touch_idx]) age_q[i] <= age_q[i] + 1'b1;
        age_q[touch_idx] <= '0;
      end
    end
  end

  // data array: no reset needed, valid bits guard it
  always_ff @(posedge clk) begin
    if (p_en_i && p_we_i && p_hit_o) data_q[p_idx] <= merged_line;
    for (int s = 0; s < N_SUB; s++)
      if (fill_we_i[s])
        data_q[fill_line_i][s*LINE_BITS +: LINE_BITS] <= fill_data_i[s*LINE_BITS +: LINE_BITS];
  end

  assign ev_valid_o = valid_q[ev_line_i];
  assign ev_btag_o  = btag_q[ev_line_i];
  assign ev_dirty_o = dirty_q[ev_line_i];
  assign ev_data_o  = data_q[ev_line_i];

endmodule
