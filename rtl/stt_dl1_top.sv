// STT-MRAM L1 data cache with a Very Wide Buffer (VWB).
//
// This is the data-side L1 of a single-core 1 GHz processor in which the
// SRAM data cache is replaced by a 64 KB, 2-way STT-MRAM cache. STT-MRAM
// reads are slow (4 cycles) and writes take 2 cycles, so a small, fully
// associative VWB of two 1 Kbit lines sits between the processor and the
// array: it is wide towards the array (a VWB line is filled from two
// 512-bit array lines in different banks) and word wide towards the
// processor, and it serves most loads in one cycle.
//
//   processor --word--> [VWB 2 x 1 Kbit] <--512 bit--> [4 STT-MRAM banks]
//        \--(store that misses the VWB)------------------^       |
//                                   [tag array]  [write buffer] --> L2
//
// Ports: a processor request port (load, store, prefetch into the VWB;
// valid/ready, load data in the accepting cycle), a line-wide L2 port
// (request/grant, read data returned with rvalid, one read outstanding)
// and one-cycle event pulses for performance counting. The processor and
// the L2 are outside this design.
//
// The organisation follows the original proposal; the handshakes, the number of
// banks and the word width are this design's choices (see the package).
module stt_dl1_top
  import dl1_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // processor
  input  logic    req_valid_i,
  input  op_e     req_op_i,
  input  addr_t   req_addr_i,
  input  word_t   req_wdata_i,
  output logic    req_ready_o,
  output word_t   rdata_o,
  // L2
  output logic    l2_req_o,
  output logic    l2_we_o,
  output laddr_t  l2_laddr_o,
  output line_t   l2_wdata_o,
  input  logic    l2_gnt_i,
  input  logic    l2_rvalid_i,
  input  line_t   l2_rdata_i,
  // performance events
  output events_t events_o
);

  localparam int unsigned VIB = (VWB_LINES > 1) ? $clog2(VWB_LINES) : 1;

  // VWB
  addr_t                    vwb_p_addr;
  logic                     vwb_p_en, vwb_p_we, vwb_p_hit;
  word_t                    vwb_p_wdata, vwb_p_rdata;
  logic [VIB-1:0]           vwb_victim, vwb_fill_line, vwb_ev_line;
  logic                     vwb_fill_start, vwb_fill_done, vwb_ev_valid;
  logic [BADDR_BITS-1:0]    vwb_fill_btag, vwb_ev_btag;
  logic [SUBLINES-1:0]      vwb_fill_we, vwb_ev_dirty;
  logic [VWB_LINE_BITS-1:0] vwb_fill_data, vwb_ev_data;
  // tag array
  laddr_t tag_a_laddr, tag_b_laddr;
  logic   tag_a_hit, tag_a_touch, tag_a_set_dirty;
  way_t   tag_a_way, tag_b_way, tag_b_victim, tag_b_wway;
  logic   tag_b_hit, tag_b_victim_valid, tag_b_victim_dirty;
  tag_t   tag_b_victim_tag;
  logic   tag_b_install, tag_b_touch, tag_b_set_dirty;
  // banks
  logic [NUM_BANKS-1:0]      bank_req, bank_we, bank_busy, bank_rvalid;
  row_t                      bank_row   [NUM_BANKS];
  line_t                     bank_wdata [NUM_BANKS];
  line_t                     bank_rdata [NUM_BANKS];
  logic [WORDS_PER_LINE-1:0] bank_wmask [NUM_BANKS];
  // write buffer
  logic   wb_push, wb_full, wb_empty, wb_pop, wb_match;
  laddr_t wb_push_laddr, wb_head_laddr, wb_lk_laddr;
  line_t  wb_push_data, wb_head_data;

  vwb u_vwb (
    .clk, .rst_n,
    .p_addr_i     (vwb_p_addr),
    .p_en_i       (vwb_p_en),
    .p_we_i       (vwb_p_we),
    .p_wdata_i    (vwb_p_wdata),
    .p_hit_o      (vwb_p_hit),
    .p_rdata_o    (vwb_p_rdata),
    .victim_o     (vwb_victim),
    .fill_start_i (vwb_fill_start),
    .fill_line_i  (vwb_fill_line),
    .fill_btag_i  (vwb_fill_btag),
    .fill_we_i    (vwb_fill_we),
    .fill_data_i  (vwb_fill_data),
    .fill_done_i  (vwb_fill_done),
    .ev_line_i    (vwb_ev_line),
    .ev_valid_o   (vwb_ev_valid),
    .ev_btag_o    (vwb_ev_btag),
    .ev_dirty_o   (vwb_ev_dirty),
    .ev_data_o    (vwb_ev_data)
  );

  dl1_tag_array u_tags (
    .clk, .rst_n,
    .a_laddr_i        (tag_a_laddr),
    .a_hit_o          (tag_a_hit),
    .a_way_o          (tag_a_way),
    .a_touch_i        (tag_a_touch),
    .a_set_dirty_i    (tag_a_set_dirty),
    .b_laddr_i        (tag_b_laddr),
    .b_hit_o          (tag_b_hit),
    .b_way_o          (tag_b_way),
    .b_victim_o       (tag_b_victim),
    .b_victim_valid_o (tag_b_victim_valid),
    .b_victim_dirty_o (tag_b_victim_dirty),
    .b_victim_tag_o   (tag_b_victim_tag),
    .b_install_i      (tag_b_install),
    .b_touch_i        (tag_b_touch),
    .b_set_dirty_i    (tag_b_set_dirty),
    .b_wway_i         (tag_b_wway)
  );

  for (genvar b = 0; b < int'(NUM_BANKS); b++) begin : g_bank
    stt_mram_bank u_bank (
      .clk, .rst_n,
      .req_i    (bank_req[b]),
      .we_i     (bank_we[b]),
      .row_i    (bank_row[b]),
      .wdata_i  (bank_wdata[b]),
      .wmask_i  (bank_wmask[b]),
      .busy_o   (bank_busy[b]),
      .rvalid_o (bank_rvalid[b]),
      .rdata_o  (bank_rdata[b])
    );
  end

  write_buffer u_wbuf (
    .clk, .rst_n,
    .push_i       (wb_push),
    .push_laddr_i (wb_push_laddr),
    .push_data_i  (wb_push_data),
    .full_o       (wb_full),
    .empty_o      (wb_empty),
    .head_laddr_o (wb_head_laddr),
    .head_data_o  (wb_head_data),
    .pop_i        (wb_pop),
    .lk_laddr_i   (wb_lk_laddr),
    .match_o      (wb_match)
  );

  dcache_ctrl u_ctrl (
    .clk, .rst_n,
    .req_valid_i, .req_op_i, .req_addr_i, .req_wdata_i, .req_ready_o, .rdata_o,
    .vwb_p_addr_o         (vwb_p_addr),
    .vwb_p_en_o           (vwb_p_en),
    .vwb_p_we_o           (vwb_p_we),
    .vwb_p_wdata_o        (vwb_p_wdata),
    .vwb_p_hit_i          (vwb_p_hit),
    .vwb_p_rdata_i        (vwb_p_rdata),
    .vwb_victim_i         (vwb_victim),
    .vwb_fill_start_o     (vwb_fill_start),
    .vwb_fill_line_o      (vwb_fill_line),
    .vwb_fill_btag_o      (vwb_fill_btag),
    .vwb_fill_we_o        (vwb_fill_we),
    .vwb_fill_data_o      (vwb_fill_data),
    .vwb_fill_done_o      (vwb_fill_done),
    .vwb_ev_line_o        (vwb_ev_line),
    .vwb_ev_valid_i       (vwb_ev_valid),
    .vwb_ev_btag_i        (vwb_ev_btag),
    .vwb_ev_dirty_i       (vwb_ev_dirty),
    .vwb_ev_data_i        (vwb_ev_data),
    .tag_a_laddr_o        (tag_a_laddr),
    .tag_a_hit_i          (tag_a_hit),
    .tag_a_way_i          (tag_a_way),
    .tag_a_touch_o        (tag_a_touch),
    .tag_a_set_dirty_o    (tag_a_set_dirty),
    .tag_b_laddr_o        (tag_b_laddr),
    .tag_b_hit_i          (tag_b_hit),
    .tag_b_way_i          (tag_b_way),
    .tag_b_victim_i       (tag_b_victim),
    .tag_b_victim_valid_i (tag_b_victim_valid),
    .tag_b_victim_dirty_i (tag_b_victim_dirty),
    .tag_b_victim_tag_i   (tag_b_victim_tag),
    .tag_b_install_o      (tag_b_install),
    .tag_b_touch_o        (tag_b_touch),
    .tag_b_set_dirty_o    (tag_b_set_dirty),
    .tag_b_wway_o         (tag_b_wway),
    .bank_req_o           (bank_req),
    .bank_we_o            (bank_we),
    .bank_row_o           (bank_row),
    .bank_wdata_o         (bank_wdata),
    .bank_wmask_o         (bank_wmask),
    .bank_busy_i          (bank_busy),
    .bank_rvalid_i        (bank_rvalid),
    .bank_rdata_i         (bank_rdata),
    .wb_push_o            (wb_push),
    .wb_push_laddr_o      (wb_push_laddr),
    .wb_push_data_o       (wb_push_data),
    .wb_full_i            (wb_full),
    .wb_empty_i           (wb_empty),
    .wb_head_laddr_i      (wb_head_laddr),
    .wb_head_data_i       (wb_head_data),
    .wb_pop_o             (wb_pop),
    .wb_lk_laddr_o        (wb_lk_laddr),
    .wb_match_i           (wb_match),
    .l2_req_o, .l2_we_o, .l2_laddr_o, .l2_wdata_o, .l2_gnt_i, .l2_rvalid_i, .l2_rdata_i,
    .events_o
  );

endmodule
