// Controller of the STT-MRAM L1 data cache with a Very Wide Buffer.
//
// It implements the access policies of the cache:
//  * Load: the VWB is looked up first and answers a hit in the same cycle.
//    On a miss the whole VWB line (the aligned block of SUBLINES DL1 lines)
//    is promoted from the STT-MRAM array into the least recently used VWB
//    line; DL1 lines that miss are first fetched from L2 into the array
//    (allocate on load) and forwarded into the VWB as they arrive. The
//    replaced VWB line is written back into the array, one DL1 line per
//    dirty part, or to the write buffer if the array no longer holds it.
//  * Store: a VWB hit updates the VWB only. A VWB miss writes the word
//    straight into the array (no allocation in the VWB). A store that also
//    misses the array allocates the line from L2 first (write allocate) and
//    then writes it (write back, never write through).
//  * Prefetch: starts a promotion and completes at once, so the promotion
//    runs in the background while the processor continues. VWB hits go on
//    during it; a load or store to the array goes on unless its bank is
//    busy, which stalls the processor (bank conflict).
//  * Dirty lines evicted from the array go to the write buffer, which
//    drains to L2 whenever no refill needs the port. A refill of a line
//    still queued there waits until it has drained.
//
// One miss engine (a state machine) does promotions and write-allocates,
// one at a time. The processor-side request is accepted in the cycle where
// `req_ready_o` is high; for a load `rdata_o` is valid in that cycle.
// Timing at the defaults: VWB hit 1 cycle; load that misses the VWB and
// hits the array (clean replaced line) 1 + SUBLINES + READ_CYCLES + 1
// cycles; direct store to the array 1 cycle, keeping its bank busy 2.
//
// The policies (VWB first, promotion on load miss, write back of the
// evicted VWB line into the array, no VWB allocation on store, write
// allocate and write back for the array, write buffer, banked array with
// stall on conflict, software prefetch into the VWB) follow the original proposal.
// The single miss engine, the sequential handling of the DL1 lines of a
// block, the order of the steps and the handshakes are this design's own.
// While a promotion runs, a load that misses the VWB does not wait for the
// engine: if its line is in the array, outside the sets the engine works on,
// and its bank is free, the word is read straight from that bank
// (1 + READ_CYCLES cycles) and returned without being copied into the VWB;
// if the bank is busy the processor stalls. This follows the proposal's
// banked array that lets the processor fetch during a promotion; serving
// such a load without promoting it is this design's choice, since the one
// engine and both VWB lines are taken.
//
// Several outputs are plain routing: the processor's address and store data
// go unchanged to the VWB and tag-array ports, and the VWB's read word goes
// back to the processor; the write buffer's oldest line is what goes to L2.
// The controller only decides when these take effect.
module dcache_ctrl
  import dl1_pkg::*;
#(
  localparam int unsigned NB    = NUM_BANKS,
  localparam int unsigned NS    = SUBLINES,
  localparam int unsigned KB    = (SUB_BITS > 0) ? SUB_BITS : 1,
  localparam int unsigned VIB   = (VWB_LINES > 1) ? $clog2(VWB_LINES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor
  input  logic                       req_valid_i,
  input  op_e                        req_op_i,
  input  addr_t                      req_addr_i,
  input  word_t                      req_wdata_i,
  output logic                       req_ready_o,
  output word_t                      rdata_o,
  // VWB
  output addr_t                      vwb_p_addr_o,
  output logic                       vwb_p_en_o,
  output logic                       vwb_p_we_o,
  output word_t                      vwb_p_wdata_o,
  input  logic                       vwb_p_hit_i,
  input  word_t                      vwb_p_rdata_i,
  input  logic [VIB-1:0]             vwb_victim_i,
  output logic                       vwb_fill_start_o,
  output logic [VIB-1:0]             vwb_fill_line_o,
  output logic [BADDR_BITS-1:0]      vwb_fill_btag_o,
  output logic [NS-1:0]              vwb_fill_we_o,
  output logic [VWB_LINE_BITS-1:0]   vwb_fill_data_o,
  output logic                       vwb_fill_done_o,
  output logic [VIB-1:0]             vwb_ev_line_o,
  input  logic                       vwb_ev_valid_i,
  input  logic [BADDR_BITS-1:0]      vwb_ev_btag_i,
  input  logic [NS-1:0]              vwb_ev_dirty_i,
  input  logic [VWB_LINE_BITS-1:0]   vwb_ev_data_i,
  // tag array
  output laddr_t                     tag_a_laddr_o,
  input  logic                       tag_a_hit_i,
  input  way_t                       tag_a_way_i,
  output logic                       tag_a_touch_o,
  output logic                       tag_a_set_dirty_o,
  output laddr_t                     tag_b_laddr_o,
  input  logic                       tag_b_hit_i,
  input  way_t                       tag_b_way_i,
  input  way_t                       tag_b_victim_i,
  input  logic                       tag_b_victim_valid_i,
  input  logic                       tag_b_victim_dirty_i,
  input  tag_t                       tag_b_victim_tag_i,
  output logic                       tag_b_install_o,
  output logic                       tag_b_touch_o,
  output logic                       tag_b_set_dirty_o,
  output way_t                       tag_b_wway_o,
  // data banks
  output logic [NB-1:0]              bank_req_o,
  output logic [NB-1:0]              bank_we_o,
  output row_t                       bank_row_o   [NB],
  output line_t                      bank_wdata_o [NB],
  output logic [WORDS_PER_LINE-1:0]  bank_wmask_o [NB],
  input  logic [NB-1:0]              bank_busy_i,
  input  logic [NB-1:0]              bank_rvalid_i,
  input  line_t                      bank_rdata_i [NB],
  // write buffer
  output logic                       wb_push_o,
  output laddr_t                     wb_push_laddr_o,
  output line_t                      wb_push_data_o,
  input  logic                       wb_full_i,
  input  logic                       wb_empty_i,
  input  laddr_t                     wb_head_laddr_i,
  input  line_t                      wb_head_data_i,
  output logic                       wb_pop_o,
  output laddr_t                     wb_lk_laddr_o,
  input  logic                       wb_match_i,
  // L2
  output logic                       l2_req_o,
  output logic                       l2_we_o,
  output laddr_t                     l2_laddr_o,
  output line_t                      l2_wdata_o,
  input  logic                       l2_gnt_i,
  input  logic                       l2_rvalid_i,
  input  line_t                      l2_rdata_i,
  // events
  output events_t                    events_o
);

  typedef enum logic [3:0] {
    E_IDLE,      // nothing to do
    E_WB,        // write dirty parts of the replaced VWB line back
    E_LOOK,      // look up the next DL1 line of the block, read it if present
    E_VRD,       // DL1 miss: read the dirty array victim
    E_VWAIT,     // wait for the victim data
    E_VPUSH,     // put the victim into the write buffer
    E_L2REQ,     // request the line from L2
    E_L2RESP,    // wait for the L2 data
    E_INSTALL,   // write the line into the array (and into the VWB)
    E_WAITRD     // wait for the outstanding array reads of the block
  } estate_e;

  typedef enum logic { K_PROMOTE, K_ALLOC } kind_e;

  estate_e                  st_q;
  kind_e                    kind_q;
  logic [BADDR_BITS-1:0]    blk_q;
  logic [VIB-1:0]           vline_q;
  logic [VWB_LINE_BITS-1:0] evd_q;
  logic [NS-1:0]            evdirty_q;
  logic [BADDR_BITS-1:0]    evbtag_q;
  logic [KB-1:0]            k_q;
  laddr_t                   fla_q;      // line being refilled
  way_t                     vway_q;     // array way receiving it
  tag_t                     vtag_q;     // tag of the line it replaces
  line_t                    vdata_q;    // victim data, then refill data
  logic [NS-1:0]            pend_q;     // array reads outstanding per DL1 line
  logic [NS-1:0]            got_q;      // DL1 lines of the block already in the VWB

  // ------------------------------------------------------------------
  // request decode
  // ------------------------------------------------------------------
  laddr_t                req_la;
  logic [BADDR_BITS-1:0] req_blk;
  bank_t                 req_bank;
  logic [$clog2(WORDS_PER_LINE)-1:0] req_wsel;
  logic                  eng_busy;
  logic                  blk_locked;

  assign req_la   = req_addr_i[ADDR_BITS-1:OFF_BITS];
  assign req_blk  = req_addr_i[ADDR_BITS-1 -: BADDR_BITS];
  assign req_bank = bank_of(req_la);
  assign req_wsel = req_addr_i[2 +: $clog2(WORDS_PER_LINE)];
  assign eng_busy = (st_q != E_IDLE);
  // The engine owns the sets of the block it promotes and of the VWB line
  // it writes back (ALLOC only runs for the request that waits on it).
  // Locking is by group of sets (the sets of one VWB line), so that no
  // store touches a set whose replacement the engine is working on.
  localparam int unsigned GB = SET_BITS - SUB_BITS;
  assign blk_locked = eng_busy && (req_blk[GB-1:0] == blk_q[GB-1:0] ||
                                   (st_q == E_WB && req_blk[GB-1:0] == evbtag_q[GB-1:0]));

  events_t ev_m;       // processor-side events
  logic    ev_wbk;     // engine wrote a VWB line part back into the array

  // engine start requests from the processor side
  logic start_promote, start_alloc;

  // engine bank request (at most one per cycle)
  logic  e_breq, e_bwe;
  bank_t e_bidx;
  row_t  e_brow;
  line_t e_bwdata;
  // processor bank request (a direct store, or the read of a direct load)
  logic  m_breq, m_bwe;
  // direct load in flight: a load that missed the VWB during a promotion and
  // is being read from its bank
  logic  dr_q, dr_start;
  bank_t dr_bank_q;
  logic [$clog2(WORDS_PER_LINE)-1:0] dr_wsel_q;
  logic  dr_done;
  assign dr_done = dr_q && bank_rvalid_i[dr_bank_q];

  assign vwb_p_addr_o  = req_addr_i;
  assign vwb_p_wdata_o = req_wdata_i;
  assign rdata_o       = dr_q ? bank_rdata_i[dr_bank_q][dr_wsel_q*WORD_BITS +: WORD_BITS]
                               : vwb_p_rdata_i;
  assign tag_a_laddr_o = req_la;

  always_comb begin
    req_ready_o       = 1'b0;
    vwb_p_en_o        = 1'b0;
    vwb_p_we_o        = 1'b0;
    start_promote     = 1'b0;
    start_alloc       = 1'b0;
    m_breq            = 1'b0;
    m_bwe             = 1'b1;
    dr_start          = 1'b0;
    tag_a_touch_o     = 1'b0;
    tag_a_set_dirty_o = 1'b0;
    ev_m              = '0;
    if (req_valid_i) begin
      unique case (req_op_i)
        OP_LOAD: begin
          if (dr_q) begin
            // direct load in flight: done when its bank returns the line
            req_ready_o = dr_done;
          end else if (vwb_p_hit_i) begin
            req_ready_o = 1'b1;
            vwb_p_en_o  = 1'b1;
            ev_m.vwb_load_hit = 1'b1;
          end else if (!eng_busy) begin
            start_promote     = 1'b1;
            ev_m.vwb_miss = 1'b1;
          end else if (!blk_locked && tag_a_hit_i) begin
            // a promotion is running: read the word from the array if its
            // bank is free, else stall on the bank conflict
            if (!bank_busy_i[req_bank] && !(e_breq && e_bidx == req_bank)) begin
              m_breq        = 1'b1;
              m_bwe         = 1'b0;
              dr_start      = 1'b1;
              tag_a_touch_o = 1'b1;
              ev_m.dl1_load = 1'b1;
            end else begin
              ev_m.bank_stall = 1'b1;
            end
          end
        end
        OP_PREFETCH: begin
          if (vwb_p_hit_i || (eng_busy && kind_q == K_PROMOTE && req_blk == blk_q)) begin
            req_ready_o = 1'b1;
          end else if (!eng_busy) begin
            start_promote     = 1'b1;
            req_ready_o       = 1'b1;
            ev_m.prefetch = 1'b1;
          end
        end
        OP_STORE: begin
          if (vwb_p_hit_i) begin
            req_ready_o = 1'b1;
            vwb_p_en_o  = 1'b1;
            vwb_p_we_o  = 1'b1;
            ev_m.vwb_store_hit = 1'b1;
          end else if (!blk_locked) begin
            if (tag_a_hit_i) begin
              if (!bank_busy_i[req_bank] && !(e_breq && e_bidx == req_bank)) begin
                m_breq            = 1'b1;
                tag_a_touch_o     = 1'b1;
                tag_a_set_dirty_o = 1'b1;
                req_ready_o       = 1'b1;
                ev_m.dl1_store = 1'b1;
              end else begin
                ev_m.bank_stall = 1'b1;
              end
            end else if (!eng_busy) begin
              start_alloc = 1'b1;
            end
          end
        end
        default: req_ready_o = 1'b1;   // unknown request: dropped
      endcase
      ev_m.stall   = !req_ready_o;
      ev_m.overlap = req_ready_o && eng_busy;
    end
  end

  // ------------------------------------------------------------------
  // miss engine
  // ------------------------------------------------------------------
  laddr_t cur_la;       // DL1 line the engine works on in E_LOOK
  laddr_t ev_la;        // DL1 line of the replaced VWB line in E_WB
  bank_t  look_bank;

  assign cur_la    = laddr_t'({blk_q, k_q});
  assign ev_la     = laddr_t'({evbtag_q, k_q});
  assign look_bank = bank_of(cur_la);

  assign vwb_ev_line_o   = vwb_victim_i;
  assign vwb_fill_line_o = start_promote ? vwb_victim_i : vline_q;
  assign vwb_fill_btag_o = req_blk;
  assign vwb_fill_start_o = start_promote;
  assign wb_lk_laddr_o   = fla_q;


  estate_e st_d;
  logic          look_adv;   // E_LOOK: this DL1 line is read or already present
  logic          l2_read_req;

  always_comb begin
    st_d              = st_q;
    look_adv          = 1'b0;
    e_breq            = 1'b0;
    e_bwe             = 1'b0;
    e_bidx            = '0;
    e_brow            = '0;
    e_bwdata          = vdata_q;
    tag_b_laddr_o     = cur_la;
    tag_b_install_o   = 1'b0;
    tag_b_touch_o     = 1'b0;
    tag_b_set_dirty_o = 1'b0;
    tag_b_wway_o      = tag_b_way_i;
    wb_push_o         = 1'b0;
    wb_push_laddr_o   = ev_la;
    wb_push_data_o    = evd_q[k_q*LINE_BITS +: LINE_BITS];
    l2_read_req       = 1'b0;
    vwb_fill_we_o     = '0;
    vwb_fill_data_o   = '0;
    ev_wbk            = 1'b0;

    // array reads of the block land in the VWB as they return
    for (int s = 0; s < int'(NS); s++) begin
      if (pend_q[s] && bank_rvalid_i[bank_of(laddr_t'({blk_q, KB'(s)}))]) begin
        vwb_fill_we_o[s] = 1'b1;
        vwb_fill_data_o[s*LINE_BITS +: LINE_BITS] = bank_rdata_i[bank_of(laddr_t'({blk_q, KB'(s)}))];
      end
    end

    unique case (st_q)
      E_IDLE: ;
      E_WB: begin
        tag_b_laddr_o = ev_la;
        if (tag_b_hit_i) begin
          // still in the array: write the whole DL1 line back into it
          e_bidx = bank_of(ev_la);
          e_brow = row_of(ev_la, tag_b_way_i);
          e_bwdata = evd_q[k_q*LINE_BITS +: LINE_BITS];
          if (!bank_busy_i[e_bidx]) begin
            e_breq = 1'b1;
            e_bwe  = 1'b1;
            tag_b_set_dirty_o = 1'b1;
            tag_b_touch_o     = 1'b1;
            ev_wbk            = 1'b1;
          end
        end else if (!wb_full_i) begin
          wb_push_o = 1'b1;
        end
      end
      E_LOOK: begin
        if (kind_q == K_ALLOC) begin
          if (tag_b_hit_i) st_d = E_IDLE;
          else st_d = tag_b_victim_valid_i && tag_b_victim_dirty_i ? E_VRD : E_L2REQ;
        end else if (got_q[k_q]) begin
          look_adv = 1'b1;
        end else if (tag_b_hit_i) begin
          e_bidx = look_bank;
          e_brow = row_of(cur_la, tag_b_way_i);
          if (!bank_busy_i[look_bank]) begin
            e_breq        = 1'b1;
            tag_b_touch_o = 1'b1;
            look_adv      = 1'b1;
          end
        end else begin
          st_d = tag_b_victim_valid_i && tag_b_victim_dirty_i ? E_VRD : E_L2REQ;
        end
      end
      E_VRD: begin
        tag_b_laddr_o = fla_q;
        e_bidx = bank_of(fla_q);
        e_brow = row_of(fla_q, vway_q);
        if (!bank_busy_i[e_bidx]) begin
          e_breq = 1'b1;
          st_d   = E_VWAIT;
        end
      end
      E_VWAIT: begin
        tag_b_laddr_o = fla_q;
        if (bank_rvalid_i[bank_of(fla_q)]) st_d = E_VPUSH;
      end
      E_VPUSH: begin
        tag_b_laddr_o   = fla_q;
        wb_push_laddr_o = laddr_t'({vtag_q, set_of(fla_q)});
        wb_push_data_o  = vdata_q;
        if (!wb_full_i) begin
          wb_push_o = 1'b1;
          st_d      = E_L2REQ;
        end
      end
      E_L2REQ: begin
        tag_b_laddr_o = fla_q;
        if (!wb_match_i) begin
          l2_read_req = 1'b1;
          if (l2_gnt_i) st_d = E_L2RESP;
        end
      end
      E_L2RESP: begin
        tag_b_laddr_o = fla_q;
        if (l2_rvalid_i) st_d = E_INSTALL;
      end
      E_INSTALL: begin
        tag_b_laddr_o = fla_q;
        tag_b_wway_o  = vway_q;
        e_bidx = bank_of(fla_q);
        e_brow = row_of(fla_q, vway_q);
        if (!bank_busy_i[e_bidx]) begin
          e_breq          = 1'b1;
          e_bwe           = 1'b1;
          tag_b_install_o = 1'b1;
          tag_b_touch_o   = 1'b1;
          if (kind_q == K_PROMOTE) begin
            // forward the refilled line into the VWB as well
            vwb_fill_we_o[k_q] = 1'b1;
            vwb_fill_data_o[k_q*LINE_BITS +: LINE_BITS] = vdata_q;
          end
        end
      end
      E_WAITRD: ;
      default: st_d = E_IDLE;
    endcase
  end

  always_comb begin
    events_o               = ev_m;
    events_o.promote_done  = vwb_fill_done_o;
    events_o.vwb_writeback = ev_wbk;
    events_o.dl1_refill    = (st_q == E_L2REQ) && l2_read_req && l2_gnt_i;
    events_o.wb_push       = wb_push_o && !wb_full_i;
    events_o.wb_hold       = (st_q == E_L2REQ) && wb_match_i;
  end

  // ------------------------------------------------------------------
  // bank multiplexing: the engine has priority, the store path takes a
  // bank only when the engine leaves it alone this cycle
  // ------------------------------------------------------------------
  line_t store_line;
  logic [WORDS_PER_LINE-1:0] store_mask;
  always_comb begin
    store_line = '0;
    store_mask = '0;
    for (int w = 0; w < int'(WORDS_PER_LINE); w++)
      store_line[w*WORD_BITS +: WORD_BITS] = req_wdata_i;
    store_mask[req_wsel] = 1'b1;
  end

  always_comb begin
    for (int b = 0; b < int'(NB); b++) begin
      bank_req_o[b]   = 1'b0;
      bank_we_o[b]    = 1'b0;
      bank_row_o[b]   = e_brow;
      bank_wdata_o[b] = e_bwdata;
      bank_wmask_o[b] = '1;
      if (e_breq && e_bidx == bank_t'(b)) begin
        bank_req_o[b] = 1'b1;
        bank_we_o[b]  = e_bwe;
      end else if (m_breq && req_bank == bank_t'(b)) begin
        bank_req_o[b]   = 1'b1;
        bank_we_o[b]    = m_bwe;
        bank_row_o[b]   = row_of(req_la, tag_a_way_i);
        bank_wdata_o[b] = store_line;
        bank_wmask_o[b] = store_mask;
      end
    end
  end

  // ------------------------------------------------------------------
  // L2 port: a refill read goes first, otherwise the write buffer drains
  // ------------------------------------------------------------------
  always_comb begin
    l2_req_o   = 1'b0;
    l2_we_o    = 1'b0;
    l2_laddr_o = fla_q;
    l2_wdata_o = wb_head_data_i;
    wb_pop_o   = 1'b0;
    if (l2_read_req) begin
      l2_req_o = 1'b1;
    end else if (!wb_empty_i) begin
      l2_req_o   = 1'b1;
      l2_we_o    = 1'b1;
      l2_laddr_o = wb_head_laddr_i;
      wb_pop_o   = l2_gnt_i;
    end
  end

  // ------------------------------------------------------------------
  // engine registers
  // ------------------------------------------------------------------
  logic all_got;
  assign all_got = &(got_q | vwb_fill_we_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= E_IDLE;
      kind_q    <= K_PROMOTE;
      blk_q     <= '0;
      vline_q   <= '0;
      evdirty_q <= '0;
      evbtag_q  <= '0;
      k_q       <= '0;
      fla_q     <= '0;
      vway_q    <= '0;
      vtag_q    <= '0;
      pend_q    <= '0;
      got_q     <= '0;
    end else begin
      st_q <= st_d;
      // returned reads
      pend_q <= pend_q & ~vwb_fill_we_o;
      got_q  <= got_q | vwb_fill_we_o;
      unique case (st_q)
        E_IDLE: begin
          if (start_promote) begin
            kind_q    <= K_PROMOTE;
            blk_q     <= req_blk;
            vline_q   <= vwb_victim_i;
            evdirty_q <= vwb_ev_valid_i ? vwb_ev_dirty_i : '0;
            evbtag_q  <= vwb_ev_btag_i;
            pend_q    <= '0;
            got_q     <= '0;
            if (vwb_ev_valid_i && |vwb_ev_dirty_i) begin
              st_q <= E_WB;
              k_q  <= '0;
              for (int s = int'(NS) - 1; s >= 0; s--)
                if (vwb_ev_dirty_i[s]) k_q <= KB'(s);
            end else begin
              st_q <= E_LOOK;
              k_q  <= '0;
            end
          end else if (start_alloc) begin
            kind_q <= K_ALLOC;
            blk_q  <= req_blk;
            fla_q  <= req_la;
            st_q   <= E_LOOK;
            k_q    <= req_la[KB-1:0];
            pend_q <= '0;
            got_q  <= '0;
          end
        end
        E_WB: begin
          if (e_breq || wb_push_o) begin
            evdirty_q[k_q] <= 1'b0;
            if ((evdirty_q & ~(NS'(1) << k_q)) == '0) begin
              st_q <= E_LOOK;
              k_q  <= '0;
            end else begin
              for (int s = int'(NS) - 1; s >= 0; s--)
                if (evdirty_q[s] && KB'(s) != k_q) k_q <= KB'(s);
            end
          end
        end
        E_LOOK: begin
          if (look_adv) begin
            if (e_breq) pend_q[k_q] <= 1'b1;
            if (k_q == KB'(NS - 1)) st_q <= E_WAITRD;
            else k_q <= k_q + 1'b1;
          end else if (!tag_b_hit_i) begin
            fla_q  <= cur_la;
            vway_q <= tag_b_victim_i;
            vtag_q <= tag_b_victim_tag_i;
          end
        end
        E_INSTALL: begin
          if (e_breq) begin
            if (kind_q == K_PROMOTE) begin
              got_q[k_q] <= 1'b1;
              if (k_q == KB'(NS - 1)) st_q <= E_WAITRD;
              else begin
                st_q <= E_LOOK;
                k_q  <= k_q + 1'b1;
              end
            end else begin
              st_q <= E_IDLE;
            end
          end
        end
        E_WAITRD: begin
          if (all_got) st_q <= E_IDLE;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr_q      <= 1'b0;
      dr_bank_q <= '0;
      dr_wsel_q <= '0;
    end else if (dr_start) begin
      dr_q      <= 1'b1;
      dr_bank_q <= req_bank;
      dr_wsel_q <= req_wsel;
    end else if (dr_done) begin
      dr_q      <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (st_q == E_IDLE && start_promote) evd_q <= vwb_ev_data_i;
    if (st_q == E_VWAIT && bank_rvalid_i[bank_of(fla_q)]) vdata_q <= bank_rdata_i[bank_of(fla_q)];
    if (st_q == E_L2RESP && l2_rvalid_i) vdata_q <= l2_rdata_i;
  end

  assign vwb_fill_done_o = (st_q == E_WAITRD && all_got);

endmodule
