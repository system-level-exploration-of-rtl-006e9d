// Tag, state and replacement store of the 2-way set-associative STT-MRAM
// L1 data cache.
//
// For every set and way it keeps the tag, a valid bit and a dirty bit
// (write-back cache), and per set a pointer to the way to replace next.
// It has two lookup ports that answer in the same cycle: port A serves the
// processor-side store path, port B the miss engine (promotion into the
// VWB, refills from L2, write-backs from the VWB). Each port can update the
// set it looked up at the next clock edge; if both update the same set,
// port B wins (the controller keeps them on different sets).
//
// The tags sit in a small fast memory per way with asynchronous read, and the
// valid, dirty and replacement bits in flip-flops, so that a lookup costs no
// STT-MRAM access; only the data lines live in the slow banks. Replacement is LRU
// for two ways (the pointer names the way not used last); with more ways it
// becomes a cheaper round robin after the last used way. Associativity and
// capacity follow the original proposal; the tag storage, the two ports and the
// replacement policy are this design's choices.
module dl1_tag_array
  import dl1_pkg::*;
#(
  parameter int unsigned N_SETS = SETS,
  parameter int unsigned N_WAYS = DL1_WAYS
) (
  input  logic   clk,
  input  logic   rst_n,
  // port A: lookup + mark dirty / touch
  input  laddr_t a_laddr_i,
  output logic   a_hit_o,
  output way_t   a_way_o,
  input  logic   a_touch_i,      // touch a_way_o (LRU)
  input  logic   a_set_dirty_i,  // mark a_way_o dirty (store written to the array)
  // port B: lookup + victim + install / touch
  input  laddr_t b_laddr_i,
  output logic   b_hit_o,
  output way_t   b_way_o,
  output way_t   b_victim_o,
  output logic   b_victim_valid_o,
  output logic   b_victim_dirty_o,
  output tag_t   b_victim_tag_o,
  input  logic   b_install_i,    // write tag of b_laddr_i into way b_wway_i
  input  logic   b_touch_i,      // touch way b_wway_i
  input  logic   b_set_dirty_i,  // mark way b_wway_i dirty
  input  way_t   b_wway_i
);

  tag_t tag_q   [N_WAYS][N_SETS];   // tag memory, one per way, not reset
  logic valid_q [N_SETS][N_WAYS];
  logic dirty_q [N_SETS][N_WAYS];
  way_t repl_q  [N_SETS];

  set_t a_set, b_set;
  assign a_set = set_of(a_laddr_i);
  assign b_set = set_of(b_laddr_i);

  always_comb begin
    a_hit_o = 1'b0;
    a_way_o = '0;
    b_hit_o = 1'b0;
    b_way_o = '0;
    for (int w = 0; w < int'(N_WAYS); w++) begin
      if (valid_q[a_set][w] && tag_q[w][a_set] == tag_of(a_laddr_i)) begin
        a_hit_o = 1'b1;
        a_way_o = way_t'(w);
      end
      if (valid_q[b_set][w] && tag_q[w][b_set] == tag_of(b_laddr_i)) begin
        b_hit_o = 1'b1;
        b_way_o = way_t'(w);
      end
    end
  end

  // Invalid ways are filled first, otherwise the replacement pointer.
  always_comb begin
    b_victim_o = repl_q[b_set];
    for (int w = int'(N_WAYS) - 1; w >= 0; w--)
      if (!valid_q[b_set][w]) b_victim_o = way_t'(w);
  end
  assign b_victim_valid_o = valid_q[b_set][b_victim_o];
  assign b_victim_dirty_o = dirty_q[b_set][b_victim_o];
  assign b_victim_tag_o   = tag_q[b_victim_o][b_set];

  always_ff @(posedge clk) begin
    if (b_install_i) tag_q[b_wway_i][b_set] <= tag_of(b_laddr_i);
  end

  function automatic way_t next_way(way_t w);
    return (w == way_t'(N_WAYS - 1)) ? '0 : w + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_SETS); s++) begin
        repl_q[s] <= '0;
        for (int w = 0; w < int'(N_WAYS); w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
        end
      end
    end else begin
      if (a_set_dirty_i) dirty_q[a_set][a_way_o] <= 1'b1;
      if (a_touch_i)     repl_q[a_set] <= next_way(a_way_o);
      if (b_install_i) begin
        valid_q[b_set][b_wway_i] <= 1'b1;
        dirty_q[b_set][b_wway_i] <= 1'b0;
      end
      if (b_set_dirty_i) dirty_q[b_set][b_wway_i] <= 1'b1;
      if (b_touch_i)     repl_q[b_set] <= next_way(b_wway_i);
    end
  end

endmodule
