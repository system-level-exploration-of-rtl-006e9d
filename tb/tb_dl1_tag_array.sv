// Self-checking test of the DL1 tag array: installs lines through port B,
// looks them up through both ports, checks dirty marking, that invalid ways
// are filled first and that the replacement pointer names the way not used
// last (LRU for two ways), against a reference model, at a reduced set count.
module tb_dl1_tag_array;
  import dl1_pkg::*;
  localparam int unsigned NS = 16;
  logic clk = 0, rst_n = 0;
  laddr_t a_la = '0, b_la = '0;
  logic a_hit, b_hit, b_vvalid, b_vdirty;
  way_t a_way, b_way, b_victim, b_wway = '0;
  tag_t b_vtag;
  logic a_touch = 0, a_dirty = 0, b_install = 0, b_touch = 0, b_sdirty = 0;
  int checks = 0, failures = 0;
  // reference
  tag_t rtag[NS][2];
  bit   rval[NS][2], rdirty[NS][2];
  int   rlast[NS];

  dl1_tag_array #(.N_SETS(NS)) dut (.clk, .rst_n,
    .a_laddr_i(a_la), .a_hit_o(a_hit), .a_way_o(a_way), .a_touch_i(a_touch), .a_set_dirty_i(a_dirty),
    .b_laddr_i(b_la), .b_hit_o(b_hit), .b_way_o(b_way), .b_victim_o(b_victim),
    .b_victim_valid_o(b_vvalid), .b_victim_dirty_o(b_vdirty), .b_victim_tag_o(b_vtag),
    .b_install_i(b_install), .b_touch_i(b_touch), .b_set_dirty_i(b_sdirty),
    .b_wway_i(b_wway));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line address with a set below NS and one of 4 tags
  function automatic laddr_t mk(int set, int tag);
    return laddr_t'({tag_t'(tag), set_t'(set)});
  endfunction

  function automatic int ref_way(laddr_t la);
    int s = int'(set_of(la));
    for (int w = 0; w < 2; w++) if (rval[s][w] && rtag[s][w] == tag_of(la)) return w;
    return -1;
  endfunction

  function automatic int ref_victim(int s);
    if (!rval[s][0]) return 0;
    if (!rval[s][1]) return 1;
    return 1 - rlast[s];
  endfunction

  initial begin
    for (int s = 0; s < int'(NS); s++) begin
      rlast[s] = 1;
      for (int w = 0; w < 2; w++) begin rval[s][w] = 0; rdirty[s][w] = 0; rtag[s][w] = '0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int s, rw, v;
      @(negedge clk);
      a_touch = 0; a_dirty = 0; b_install = 0; b_touch = 0; b_sdirty = 0;
      s    = $urandom_range(NS - 1);
      a_la = mk($urandom_range(NS - 1), $urandom_range(3));
      b_la = mk(s, $urandom_range(3));
      #1;
      // lookups
      rw = ref_way(a_la);
      checks++;
      if (a_hit !== (rw >= 0) || (rw >= 0 && a_way !== way_t'(rw))) begin
        failures++; $display("port A lookup wrong");
      end
      rw = ref_way(b_la);
      v  = ref_victim(s);
      checks += 2;
      if (b_hit !== (rw >= 0) || (rw >= 0 && b_way !== way_t'(rw))) begin
        failures++; $display("port B lookup wrong");
      end
      if (b_victim !== way_t'(v) || b_vvalid !== rval[s][v] || (rval[s][v] && b_vdirty !== rdirty[s][v])) begin
        failures++; $display("victim wrong set %0d: got %0d expected %0d", s, b_victim, v);
      end
      // an update: install on miss, touch or dirty on hit (different sets for A and B)
      if (rw < 0) begin
        b_install = 1; b_touch = 1; b_wway = b_victim;
        rtag[s][v] = tag_of(b_la); rval[s][v] = 1; rdirty[s][v] = 0; rlast[s] = v;
      end else begin
        b_touch = 1; b_wway = b_way; rlast[s] = rw;
        if ($urandom_range(1)) begin b_sdirty = 1; rdirty[s][rw] = 1; end
      end
      if (a_hit && set_of(a_la) != set_t'(s)) begin
        a_touch = 1; rlast[set_of(a_la)] = int'(a_way);
        if ($urandom_range(1)) begin a_dirty = 1; rdirty[set_of(a_la)][a_way] = 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
