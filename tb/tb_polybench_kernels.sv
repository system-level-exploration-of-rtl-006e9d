// Workload test: PolyBench-style kernels executed through the cache.
//
// The testbench plays the processor. It runs the loops of two kernels from
// the PolyBench suite, reg-detect and gemm, at small sizes, issuing every
// array load and store through the cache's processor port. Arithmetic is on
// 32-bit integers. Each kernel runs twice: once as plain code, and once with
// software prefetches into the VWB ahead of the streamed rows (the prefetch
// transformation). In gemm only the row-wise operand A is prefetched: B is
// walked by column, and with two VWB lines a prefetch per B block would push
// A's row out again. After each run the arrays are read back through the
// cache and compared with the same kernel computed directly in the
// testbench. Cycle counts and VWB hit rates are printed. For reg-detect,
// whose rows are streamed, the prefetching version must be faster; for gemm
// the column walk over B dominates and the times are only reported.
//
// Sizes (own choice, reduced datasets): reg-detect with MAXGRID = 6,
// LENGTH = 32, NITER = 2; gemm with N = 16. The L2 model answers in 10
// cycles.
module tb_polybench_kernels;
  import dl1_pkg::*;
  `include "dl1_tb_funcs.svh"

  localparam int MAXGRID = 6, LENGTH = 32, NITER = 2, N = 16;

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
  longint cycle = 0;
  int n_hit = 0, n_miss = 0, n_pf = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_hit  += int'(ev.vwb_load_hit) + int'(ev.vwb_store_hit);
      n_miss += int'(ev.vwb_miss) + int'(ev.dl1_store) + int'(ev.dl1_load);
      n_pf   += int'(ev.prefetch);
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(op_e op, addr_t a, word_t wd, output word_t rd);
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = wd;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    rd = rdata;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic ld(addr_t a, output word_t v);
    access(OP_LOAD, a, '0, v);
  endtask
  task automatic st(addr_t a, word_t v);
    word_t d;
    access(OP_STORE, a, v, d);
  endtask
  task automatic pf(addr_t a);
    word_t d;
    access(OP_PREFETCH, a, '0, d);
  endtask

  // ---------------- array layout (word arrays, row major) ----------------
  // each array starts on its own 4 KB boundary
  function automatic addr_t base(int k);
    return addr_t'(32'h0010_0000 + k * 32'h1000);
  endfunction
  function automatic addr_t a2(int k, int i, int j, int cols);
    return base(k) + addr_t'((i * cols + j) * 4);
  endfunction
  function automatic addr_t a3(int k, int i, int j, int c, int d2, int d3);
    return base(k) + addr_t'(((i * d2 + j) * d3 + c) * 4);
  endfunction
  // reg-detect arrays
  localparam int SUM_TANG = 0, MEAN = 1, PATH = 2, DIFF = 3, SUM_DIFF = 6;
  // gemm arrays
  localparam int GA = 10, GB = 11, GC = 12;

  // reference copies
  word_t r_sum_tang[MAXGRID][MAXGRID], r_mean[MAXGRID][MAXGRID], r_path[MAXGRID][MAXGRID];
  word_t r_diff[MAXGRID][MAXGRID][LENGTH], r_sum_diff[MAXGRID][MAXGRID][LENGTH];
  word_t r_a[N][N], r_b[N][N], r_c[N][N];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- reg-detect ----------------
  task automatic reg_detect(bit prefetch, output longint cyc);
    word_t v, w;
    longint t0;
    // init (PolyBench-style integer init)
    for (int i = 0; i < MAXGRID; i++)
      for (int j = 0; j < MAXGRID; j++) begin
        r_sum_tang[i][j] = word_t'((i + 1) * (j + 1));
        r_mean[i][j]     = word_t'((i - j) / MAXGRID);
        r_path[i][j]     = word_t'((i * (j - 1)) / MAXGRID);
        st(a2(SUM_TANG, i, j, MAXGRID), r_sum_tang[i][j]);
        st(a2(MEAN, i, j, MAXGRID), r_mean[i][j]);
        st(a2(PATH, i, j, MAXGRID), r_path[i][j]);
      end
    // reference
    for (int t = 0; t < NITER; t++) begin
      for (int j = 0; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++)
          for (int c = 0; c < LENGTH; c++) r_diff[j][i][c] = r_sum_tang[j][i];
      for (int j = 0; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++) begin
          r_sum_diff[j][i][0] = r_diff[j][i][0];
          for (int c = 1; c < LENGTH; c++) r_sum_diff[j][i][c] = r_sum_diff[j][i][c-1] + r_diff[j][i][c];
          r_mean[j][i] = r_sum_diff[j][i][LENGTH-1];
        end
      for (int i = 0; i < MAXGRID; i++) r_path[0][i] = r_mean[0][i];
      for (int j = 1; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++) r_path[j][i] = r_path[j-1][i-1] + r_mean[j][i];
    end
    // through the cache
    t0 = cycle;
    for (int t = 0; t < NITER; t++) begin
      for (int j = 0; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++) begin
          if (prefetch && i + 1 < MAXGRID) pf(a3(DIFF, j, i + 1, 0, MAXGRID, LENGTH));
          ld(a2(SUM_TANG, j, i, MAXGRID), v);
          for (int c = 0; c < LENGTH; c++) st(a3(DIFF, j, i, c, MAXGRID, LENGTH), v);
        end
      for (int j = 0; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++) begin
          if (prefetch) pf(a3(SUM_DIFF, j, i, 0, MAXGRID, LENGTH));
          ld(a3(DIFF, j, i, 0, MAXGRID, LENGTH), v);
          st(a3(SUM_DIFF, j, i, 0, MAXGRID, LENGTH), v);
          for (int c = 1; c < LENGTH; c++) begin
            ld(a3(DIFF, j, i, c, MAXGRID, LENGTH), w);
            v = v + w;
            st(a3(SUM_DIFF, j, i, c, MAXGRID, LENGTH), v);
          end
          st(a2(MEAN, j, i, MAXGRID), v);
        end
      for (int i = 0; i < MAXGRID; i++) begin
        ld(a2(MEAN, 0, i, MAXGRID), v);
        st(a2(PATH, 0, i, MAXGRID), v);
      end
      for (int j = 1; j < MAXGRID; j++)
        for (int i = j; i < MAXGRID; i++) begin
          ld(a2(PATH, j - 1, i - 1, MAXGRID), v);
          ld(a2(MEAN, j, i, MAXGRID), w);
          st(a2(PATH, j, i, MAXGRID), v + w);
        end
    end
    cyc = cycle - t0;
    // compare
    for (int j = 0; j < MAXGRID; j++)
      for (int i = 0; i < MAXGRID; i++) begin
        ld(a2(PATH, j, i, MAXGRID), v);
        check(v == r_path[j][i], $sformatf("reg_detect path[%0d][%0d] %0d vs %0d", j, i, v, r_path[j][i]));
        ld(a2(MEAN, j, i, MAXGRID), v);
        check(v == r_mean[j][i], $sformatf("reg_detect mean[%0d][%0d]", j, i));
        if (i >= j) begin
          ld(a3(SUM_DIFF, j, i, LENGTH - 1, MAXGRID, LENGTH), v);
          check(v == r_sum_diff[j][i][LENGTH-1], $sformatf("reg_detect sum_diff[%0d][%0d]", j, i));
        end
      end
  endtask

  // ---------------- gemm: C = 3*A*B + 2*C ----------------
  task automatic gemm(bit prefetch, output longint cyc);
    word_t v, a, b, acc;
    longint t0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        r_a[i][j] = word_t'(i * j + 1);
        r_b[i][j] = word_t'(i + 2 * j);
        r_c[i][j] = word_t'(i - j);
        st(a2(GA, i, j, N), r_a[i][j]);
        st(a2(GB, i, j, N), r_b[i][j]);
        st(a2(GC, i, j, N), r_c[i][j]);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = 2 * r_c[i][j];
        for (int k = 0; k < N; k++) acc += 3 * r_a[i][k] * r_b[k][j];
        r_c[i][j] = acc;
      end
    t0 = cycle;
    for (int i = 0; i < N; i++) begin
      if (prefetch && i + 1 < N) pf(a2(GA, i + 1, 0, N));
      for (int j = 0; j < N; j++) begin
        ld(a2(GC, i, j, N), v);
        acc = 2 * v;
        for (int k = 0; k < N; k++) begin
          ld(a2(GA, i, k, N), a);
          ld(a2(GB, k, j, N), b);
          acc += 3 * a * b;
        end
        st(a2(GC, i, j, N), acc);
      end
    end
    cyc = cycle - t0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ld(a2(GC, i, j, N), v);
        check(v == r_c[i][j], $sformatf("gemm C[%0d][%0d]", i, j));
      end
  endtask

  initial begin
    longint c_plain, c_pf;
    int h0, m0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    h0 = n_hit; m0 = n_miss;
    reg_detect(1'b0, c_plain);
    $display("reg-detect plain:    %0d cycles, VWB hits %0d, misses %0d", c_plain, n_hit - h0, n_miss - m0);
    h0 = n_hit; m0 = n_miss;
    reg_detect(1'b1, c_pf);
    $display("reg-detect prefetch: %0d cycles, VWB hits %0d, misses %0d", c_pf, n_hit - h0, n_miss - m0);
    check(c_pf < c_plain, "reg-detect: prefetching must be faster");

    h0 = n_hit; m0 = n_miss;
    gemm(1'b0, c_plain);
    $display("gemm plain:          %0d cycles, VWB hits %0d, misses %0d", c_plain, n_hit - h0, n_miss - m0);
    h0 = n_hit; m0 = n_miss;
    gemm(1'b1, c_pf);
    $display("gemm prefetch:       %0d cycles, VWB hits %0d, misses %0d", c_pf, n_hit - h0, n_miss - m0);
    check(n_pf > 0, "prefetches issued");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
