// Directed test of the cache controller's policies and cycle counts, run on
// the whole cache (the controller only works with its VWB, tag array, banks
// and write buffer around it) and an L2 model with a fixed latency.
// It checks, with exact cycle counts at the default parameters:
//  * a VWB hit (load or store) completes in 1 cycle;
//  * a load that misses the VWB but finds both DL1 lines in the array, with
//    a clean VWB line to replace, takes 1 + SUBLINES + READ_CYCLES + 1 cycles;
//  * a store that misses the VWB and hits the array takes 1 cycle and does
//    not allocate in the VWB (a following load still promotes);
//  * a prefetch completes in 1 cycle and promotes in the background: a
//    store to another bank goes on at once, a store to a bank being read
//    stalls until it is free (READ_CYCLES cycles in all here);
//  * a load that misses the VWB while a promotion runs in other banks is
//    read straight from the array in 1 + READ_CYCLES cycles, without a
//    promotion of its own;
//  * replacing a VWB line with dirty parts writes them back into the array;
//  * loads return the right data throughout.
module tb_dcache_ctrl;
  import dl1_pkg::*;
  `include "dl1_tb_funcs.svh"

  logic   clk = 0, rst_n = 0;
  logic   req_valid = 0, req_ready;
  op_e    req_op = OP_LOAD;
  addr_t  req_addr = '0;
  word_t  req_wdata = '0, rdata;
  logic   l2_req, l2_we, l2_gnt, l2_rvalid;
  laddr_t l2_laddr;
  line_t  l2_wdata, l2_rdata;
  events_t ev;
  int     l2_reads, l2_writes;

  stt_dl1_top dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_op_i(req_op), .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .req_ready_o(req_ready), .rdata_o(rdata),
    .l2_req_o(l2_req), .l2_we_o(l2_we), .l2_laddr_o(l2_laddr), .l2_wdata_o(l2_wdata),
    .l2_gnt_i(l2_gnt), .l2_rvalid_i(l2_rvalid), .l2_rdata_i(l2_rdata),
    .events_o(ev));

  l2_model #(.LATENCY(10)) u_l2 (
    .clk, .rst_n, .wr_hold_i(1'b0), .req_i(l2_req), .we_i(l2_we), .laddr_i(l2_laddr), .wdata_i(l2_wdata),
    .gnt_o(l2_gnt), .rvalid_o(l2_rvalid), .rdata_o(l2_rdata), .reads_o(l2_reads), .writes_o(l2_writes));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t ref_mem [addr_t];
  int n_vwbk = 0, n_bstall = 0, n_dst = 0, n_vmiss = 0, n_dld = 0;
  always @(posedge clk) if (rst_n) begin
    n_vwbk   += int'(ev.vwb_writeback);
    n_bstall += int'(ev.bank_stall);
    n_dst    += int'(ev.dl1_store);
    n_dld    += int'(ev.dl1_load);
    n_vmiss  += int'(ev.vwb_miss);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t ref_read(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : mem_init(a);
  endfunction

  task automatic access(op_e op, addr_t a, word_t wd, output word_t rd, output int cycles);
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = wd;
    cycles = 1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
      cycles++;
    end
    rd = rdata;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic load(addr_t a, int exp_cycles, string what);
    word_t rd; int c;
    access(OP_LOAD, a, '0, rd, c);
    check(rd === ref_read(a), $sformatf("%s: data %h expected %h", what, rd, ref_read(a)));
    if (exp_cycles > 0) check(c == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", what, c, exp_cycles));
  endtask

  task automatic store(addr_t a, word_t d, int exp_cycles, string what);
    word_t rd; int c;
    access(OP_STORE, a, d, rd, c);
    ref_mem[a] = d;
    if (exp_cycles > 0) check(c == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", what, c, exp_cycles));
  endtask

  // blocks: bank of DL1 line 0 of block b is 2*b[0]; set group is b[7:0]
  localparam int A = 32'h100, B = 32'h101, C = 32'h102, P = 32'h104, Q = 32'h106, R = 32'h107,
                 X1 = 32'h108, X2 = 32'h10A;
  localparam int PROMOTE_HIT = 1 + int'(SUBLINES) + int'(READ_CYCLES) + 1;

  initial begin
    word_t rd; int c, wb0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // cold load: both DL1 lines come from L2
    load(blk_addr(A, 3), 0, "cold load");
    check(l2_reads == 2, "cold promotion refills both DL1 lines");
    load(blk_addr(A, 20), 1, "VWB load hit");
    store(blk_addr(A, 5), 32'h1111_2222, 1, "VWB store hit");
    load(blk_addr(A, 5), 1, "load after VWB store");
    load(blk_addr(B, 0), 0, "second block");
    // third block replaces A (dirty in its first DL1 line only)
    wb0 = n_vwbk;
    load(blk_addr(C, 0), 0, "replace dirty VWB line");
    check(n_vwbk - wb0 == 1, "one dirty DL1 line written back from the VWB");
    // A again: array hit for both lines, replaced line B is clean
    load(blk_addr(A, 5), PROMOTE_HIT, "promotion from the array");
    // store missing the VWB, hitting the array: direct, no VWB allocation
    store(blk_addr(B, 9), 32'h3333_4444, 1, "store to the array");
    check(n_dst == 1, "store went to the array");
    begin
      int m0;
      m0 = n_vmiss;
      load(blk_addr(B, 9), PROMOTE_HIT, "load after array store promotes");
      check(n_vmiss == m0 + 1, "store did not allocate in the VWB");
    end

    // background promotion and bank conflict
    load(blk_addr(Q, 0), 0, "setup Q");
    load(blk_addr(R, 0), 0, "setup R");
    load(blk_addr(P, 0), 0, "setup P");
    load(blk_addr(X1, 0), 0, "setup X1");
    load(blk_addr(X2, 0), 0, "setup X2");
    access(OP_PREFETCH, blk_addr(P, 0), '0, rd, c);
    check(c == 1, "prefetch completes at once");
    store(blk_addr(R, 2), 32'h5555_6666, 1, "store to a free bank during promotion");
    begin
      int s0;
      s0 = n_bstall;
      // the promotion read bank 0 in the cycle of the store to R, so the
      // store to Q waits out the rest of that read
      store(blk_addr(Q, 2), 32'h7777_8888, int'(READ_CYCLES), "store to a busy bank");
      check(n_bstall > s0, "bank conflict stall seen");
    end
    load(blk_addr(P, 7), 0, "prefetched block");
    load(blk_addr(P, 7), 1, "prefetched block hits");
    load(blk_addr(R, 2), 0, "R data");
    load(blk_addr(Q, 2), 0, "Q data");
    load(blk_addr(A, 5), 0, "A data after write-back");
    load(blk_addr(B, 9), 0, "B data");

    // a load that misses the VWB during a promotion reads the array directly
    // when its bank is free: X1 is promoted in banks 0 and 1, R line 0 sits
    // in bank 2 and is not in the VWB
    access(OP_PREFETCH, blk_addr(X1, 0), '0, rd, c);
    check(c == 1, "second prefetch completes at once");
    begin
      int d0;
      d0 = n_dld;
      load(blk_addr(R, 2), 1 + int'(READ_CYCLES), "load from the array during a promotion");
      check(n_dld == d0 + 1, "load was served by the array, not by a promotion");
    end
    load(blk_addr(X1, 3), 0, "prefetched X1");
    load(blk_addr(R, 2), PROMOTE_HIT, "R still promotes on its next load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
