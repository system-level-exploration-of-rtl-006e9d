// Self-checking test of the Very Wide Buffer: fills both lines through the
// wide port, checks word reads and writes through the narrow port against a
// reference copy, the per-DL1-line dirty bits, the wide read-out used for
// eviction, that a line being filled does not hit, and LRU replacement.
module tb_vwb;
  import dl1_pkg::*;
  localparam int unsigned LW = VWB_LINE_BITS;
  localparam int unsigned BT = BADDR_BITS;
  logic clk = 0, rst_n = 0;
  addr_t p_addr = '0;
  logic p_en = 0, p_we = 0, p_hit;
  word_t p_wdata = '0, p_rdata;
  logic victim, fill_line = 0, fill_start = 0, fill_done = 0, ev_line = 0, ev_valid;
  logic [BT-1:0] fill_btag = '0, ev_btag;
  logic [SUBLINES-1:0] fill_we = '0, ev_dirty;
  logic [LW-1:0] fill_data = '0, ev_data;
  int checks = 0, failures = 0;
  logic [LW-1:0] rline[2];
  logic [BT-1:0] rtag[2];
  logic [SUBLINES-1:0] rdirty[2];
  int mru;

  vwb dut (.clk, .rst_n, .p_addr_i(p_addr), .p_en_i(p_en), .p_we_i(p_we), .p_wdata_i(p_wdata),
    .p_hit_o(p_hit), .p_rdata_o(p_rdata), .victim_o(victim),
    .fill_start_i(fill_start), .fill_line_i(fill_line), .fill_btag_i(fill_btag), .fill_we_i(fill_we),
    .fill_data_i(fill_data), .fill_done_i(fill_done), .ev_line_i(ev_line), .ev_valid_o(ev_valid),
    .ev_btag_o(ev_btag), .ev_dirty_o(ev_dirty), .ev_data_o(ev_data));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // promote block `bt` into the victim line, the two halves in separate cycles
  task automatic promote(logic [BT-1:0] bt);
    int v;
    logic [LW-1:0] d;
    for (int w = 0; w < int'(LW / 32); w++) d[w*32 +: 32] = $urandom;
    @(negedge clk);
    v = int'(victim);
    check(mru == -1 || v != mru, "victim is not the least recently used line");
    fill_start = 1; fill_line = 1'(v); fill_btag = bt;
    @(negedge clk);
    fill_start = 0;
    p_addr = {bt, 7'h0};
    #1 check(!p_hit, "line being filled must not hit");
    fill_we = 2'b01; fill_data = d;
    @(negedge clk);
    fill_we = 2'b10; fill_done = 1;
    @(negedge clk);
    fill_we = '0; fill_done = 0;
    rline[v] = d; rtag[v] = bt; rdirty[v] = '0; mru = v;
    ev_line = 1'(v);
    #1 check(ev_valid && ev_btag == bt && ev_dirty == '0 && ev_data == d, "eviction read-out after fill");
  endtask

  initial begin
    mru = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    p_addr = 32'h0000_1000;
    #1 check(!p_hit, "empty VWB must miss");
    promote(25'h20);
    promote(25'h31);
    for (int t = 0; t < 400; t++) begin
      int l, w;
      l = $urandom_range(1);
      w = $urandom_range(31);
      @(negedge clk);
      p_addr = {rtag[l], 5'(w), 2'b00};
      p_en = 1;
      p_we = $urandom_range(1);
      p_wdata = $urandom;
      #1;
      check(p_hit, "resident block must hit");
      check(p_rdata == rline[l][w*32 +: 32], "read word");
      @(posedge clk);
      #1;
      if (p_we) begin
        rline[l][w*32 +: 32] = p_wdata;
        rdirty[l][w / 16] = 1'b1;
      end
      mru = l;
      p_en = 0; p_we = 0;
      ev_line = 1'(l);
      #1 check(ev_data == rline[l] && ev_dirty == rdirty[l], "line content and dirty bits");
      if (t % 50 == 49) promote(25'(t + 100));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
