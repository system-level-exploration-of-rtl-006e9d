// Shared constants and types of the STT-MRAM L1 data cache with a Very Wide
// Buffer (VWB).
//
// Geometry: a 64 KB, 2-way set-associative STT-MRAM data cache with 512-bit
// lines, read in 4 cycles and written in 2 cycles at 1 GHz, and a 2 Kbit VWB
// made of two 1 Kbit lines. These numbers are the design's reference
// configuration. The 32-bit word, the 32-bit byte address, the four data
// banks and the four-entry write buffer are this design's own choices.
//
// Address split (byte address, defaults):
//   [1:0]   byte in word (accesses are whole words)
//   [5:2]   word in DL1 line      [6]    DL1 line in VWB line
//   [14:6]  DL1 set index         [31:15] DL1 tag
//   [7:6]   bank (= low set bits) [31:7]  VWB tag
package dl1_pkg;

  localparam int unsigned ADDR_BITS      = 32;
  localparam int unsigned WORD_BITS      = 32;
  localparam int unsigned DL1_BYTES      = 65536;
  localparam int unsigned DL1_WAYS       = 2;
  localparam int unsigned LINE_BITS      = 512;
  localparam int unsigned VWB_LINES      = 2;
  localparam int unsigned VWB_LINE_BITS  = 1024;
  localparam int unsigned NUM_BANKS      = 4;
  localparam int unsigned READ_CYCLES    = 4;
  localparam int unsigned WRITE_CYCLES   = 2;
  localparam int unsigned WB_DEPTH       = 4;

  localparam int unsigned LINE_BYTES     = LINE_BITS / 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BITS / WORD_BITS;
  localparam int unsigned SUBLINES       = VWB_LINE_BITS / LINE_BITS;   // DL1 lines per VWB line
  localparam int unsigned SETS           = DL1_BYTES / (LINE_BYTES * DL1_WAYS);
  localparam int unsigned OFF_BITS       = $clog2(LINE_BYTES);
  localparam int unsigned SET_BITS       = $clog2(SETS);
  localparam int unsigned TAG_BITS       = ADDR_BITS - SET_BITS - OFF_BITS;
  localparam int unsigned LADDR_BITS     = ADDR_BITS - OFF_BITS;          // DL1 line address
  localparam int unsigned SUB_BITS       = $clog2(SUBLINES);
  localparam int unsigned BADDR_BITS     = LADDR_BITS - SUB_BITS;         // VWB line address
  localparam int unsigned BANK_BITS      = $clog2(NUM_BANKS);
  localparam int unsigned ROWS_PER_BANK  = SETS * DL1_WAYS / NUM_BANKS;
  localparam int unsigned ROW_BITS       = $clog2(ROWS_PER_BANK);
  localparam int unsigned WAY_BITS       = $clog2(DL1_WAYS);

  typedef logic [ADDR_BITS-1:0]   addr_t;
  typedef logic [WORD_BITS-1:0]   word_t;
  typedef logic [LINE_BITS-1:0]   line_t;
  typedef logic [LADDR_BITS-1:0]  laddr_t;
  typedef logic [SET_BITS-1:0]    set_t;
  typedef logic [TAG_BITS-1:0]    tag_t;
  typedef logic [WAY_BITS-1:0]    way_t;
  typedef logic [BANK_BITS-1:0]   bank_t;
  typedef logic [ROW_BITS-1:0]    row_t;

  // Processor request kinds. PREFETCH promotes the addressed VWB line
  // without returning data (the software prefetch into the VWB).
  typedef enum logic [1:0] {
    OP_LOAD     = 2'd0,
    OP_STORE    = 2'd1,
    OP_PREFETCH = 2'd2
  } op_e;

  // One-cycle event pulses of the controller, for performance counting.
  typedef struct packed {
    logic vwb_load_hit;     // load served by the VWB
    logic vwb_store_hit;    // store written into the VWB
    logic vwb_miss;         // load missed the VWB: promotion started
    logic prefetch;         // prefetch started a background promotion
    logic promote_done;     // a VWB line became valid
    logic vwb_writeback;    // dirty DL1 line of an evicted VWB line written into the array
    logic dl1_store;        // store missed the VWB and was written into the array
    logic dl1_load;         // load missed the VWB during a promotion and was read from the array
    logic dl1_refill;       // DL1 miss: line fetched from L2
    logic wb_push;          // dirty line sent to the write buffer
    logic wb_hold;          // refill held back: its line is still in the write buffer
    logic bank_stall;       // store or load held back by a bank conflict
    logic overlap;          // request completed while a promotion was in flight
    logic stall;            // request present but not accepted this cycle
  } events_t;

  // Line address helpers.
  function automatic set_t set_of(laddr_t la);
    return la[SET_BITS-1:0];
  endfunction
  function automatic tag_t tag_of(laddr_t la);
    return la[LADDR_BITS-1:SET_BITS];
  endfunction
  function automatic bank_t bank_of(laddr_t la);
    return la[BANK_BITS-1:0];
  endfunction
  // Row inside a bank: the set bits above the bank bits, then the way.
  function automatic row_t row_of(laddr_t la, way_t w);
    return {la[SET_BITS-1:BANK_BITS], w};
  endfunction

endpackage
