// End-to-end test of the STT-MRAM L1 data cache with its Very Wide Buffer.
//
// A random stream of loads, stores and prefetches with strong locality is
// run against the cache, with an L2 model behind it that is randomly busy.
// Every load is compared with a reference memory image, and at the end every
// word ever written is read back, so data that travelled through VWB
// write-backs, array evictions and the write buffer is checked too.
// The addresses fall into few sets so that the 64 KB array sees conflict
// misses. Each mechanism of the design is counted and must occur:
// VWB load and store hits, promotions on load misses, prefetches, VWB
// write-backs into the array, direct stores into the array, direct loads
// from the array while a promotion runs, refills from
// L2, evictions into the write buffer, refills held by the write buffer,
// bank-conflict stalls and requests served while a promotion is running.
module tb_stt_dl1_top;
  import dl1_pkg::*;
  `include "dl1_tb_funcs.svh"

  localparam int N_OPS = 20000;

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
  logic   l2_wr_hold = 0;

  stt_dl1_top dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_op_i(req_op), .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .req_ready_o(req_ready), .rdata_o(rdata),
    .l2_req_o(l2_req), .l2_we_o(l2_we), .l2_laddr_o(l2_laddr), .l2_wdata_o(l2_wdata),
    .l2_gnt_i(l2_gnt), .l2_rvalid_i(l2_rvalid), .l2_rdata_i(l2_rdata),
    .events_o(ev));

  l2_model #(.LATENCY(10), .BUSY_PCT(60)) u_l2 (
    .clk, .rst_n, .wr_hold_i(l2_wr_hold), .req_i(l2_req), .we_i(l2_we), .laddr_i(l2_laddr), .wdata_i(l2_wdata),
    .gnt_o(l2_gnt), .rvalid_o(l2_rvalid), .rdata_o(l2_rdata), .reads_o(l2_reads), .writes_o(l2_writes));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t ref_mem [addr_t];

  // mechanism counters
  int n_vlh, n_vsh, n_vmiss, n_pf, n_pdone, n_vwbk, n_dst, n_dld, n_refill, n_wbpush, n_wbhold,
      n_bstall, n_overlap, n_stall;
  always_ff @(posedge clk) if (rst_n) begin
    n_vlh     <= n_vlh     + int'(ev.vwb_load_hit);
    n_vsh     <= n_vsh     + int'(ev.vwb_store_hit);
    n_vmiss   <= n_vmiss   + int'(ev.vwb_miss);
    n_pf      <= n_pf      + int'(ev.prefetch);
    n_pdone   <= n_pdone   + int'(ev.promote_done);
    n_vwbk    <= n_vwbk    + int'(ev.vwb_writeback);
    n_dst     <= n_dst     + int'(ev.dl1_store);
    n_dld     <= n_dld     + int'(ev.dl1_load);
    n_refill  <= n_refill  + int'(ev.dl1_refill);
    n_wbpush  <= n_wbpush  + int'(ev.wb_push);
    n_wbhold  <= n_wbhold  + int'(ev.wb_hold);
    n_bstall  <= n_bstall  + int'(ev.bank_stall);
    n_overlap <= n_overlap + int'(ev.overlap);
    n_stall   <= n_stall   + int'(ev.stall);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic do_load(addr_t a);
    word_t rd; int c;
    access(OP_LOAD, a, '0, rd, c);
    checks++;
    if (rd !== ref_read(a)) begin
      failures++;
      if (failures < 20) $display("load %h: got %h expected %h", a, rd, ref_read(a));
    end
  endtask

  task automatic do_store(addr_t a, word_t d);
    word_t rd; int c;
    access(OP_STORE, a, d, rd, c);
    ref_mem[a] = d;
  endtask

  // random block: few set groups, many tags, so sets conflict
  function automatic int rnd_blk();
    int grp = $urandom_range(7);
    int tg  = $urandom_range(5);
    return (tg << 8) | grp | 32'h1000;
  endfunction

  initial begin
    int cur = rnd_blk();
    word_t rd; int c;
    {n_vlh, n_vsh, n_vmiss, n_pf, n_pdone, n_vwbk, n_dst, n_dld, n_refill, n_wbpush, n_wbhold,
     n_bstall, n_overlap, n_stall} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      int r;
      addr_t a;
      r = $urandom_range(99);
      if ($urandom_range(99) < 15) cur = rnd_blk();
      a = ($urandom_range(99) < 70) ? blk_addr(cur, $urandom_range(31))
                                    : blk_addr(rnd_blk(), $urandom_range(31));
      if (r < 50)      do_load(a);
      else if (r < 85) do_store(a, $urandom);
      else             access(OP_PREFETCH, blk_addr(rnd_blk(), 0), '0, rd, c);
    end
    // A refill of a line that still waits in the write buffer: make a line
    // dirty in the array, evict it while the L2 refuses writes, then load it.
    begin
      int v = 32'h3003;
      do_load(blk_addr(v, 0));
      do_load(blk_addr(32'h3005, 0));
      do_load(blk_addr(32'h3007, 0));          // block v leaves the VWB
      do_store(blk_addr(v, 1), 32'hCAFE_0001); // written straight into the array
      l2_wr_hold = 1;
      do_load(blk_addr(v + 32'h100, 0));       // same sets, other tags
      do_load(blk_addr(v + 32'h200, 0));       // evicts the dirty line of v
      fork
        begin repeat (100) @(posedge clk); l2_wr_hold = 0; end
        do_load(blk_addr(v, 1));               // refill waits for the drain
      join
    end
    // read back everything that was written
    foreach (ref_mem[a]) do_load(a);
    $display("events: vwb_load_hit=%0d vwb_store_hit=%0d vwb_miss=%0d prefetch=%0d promote_done=%0d",
             n_vlh, n_vsh, n_vmiss, n_pf, n_pdone);
    $display("        vwb_writeback=%0d dl1_store=%0d dl1_load=%0d dl1_refill=%0d wb_push=%0d wb_hold=%0d",
             n_vwbk, n_dst, n_dld, n_refill, n_wbpush, n_wbhold);
    $display("        bank_stall=%0d overlap=%0d stall_cycles=%0d l2_reads=%0d l2_writes=%0d",
             n_bstall, n_overlap, n_stall, l2_reads, l2_writes);
    begin
      int cnt[14];
      cnt = '{n_vlh, n_vsh, n_vmiss, n_pf, n_pdone, n_vwbk, n_dst, n_dld, n_refill, n_wbpush,
              n_wbhold, n_bstall, n_overlap, l2_writes};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
