// Self-checking test of one STT-MRAM bank: writes random lines (whole and
// word-masked), reads them back against a reference array, and checks that
// read data arrives exactly 4 cycles after the request cycle and that a
// write occupies the bank for exactly 2 cycles (the request cycle and one
// more).
module tb_stt_mram_bank;
  import dl1_pkg::*;
  localparam int unsigned ROWS = 16;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0, busy, rvalid;
  logic [3:0] row = 0;
  line_t wdata = '0, rdata;
  logic [WORDS_PER_LINE-1:0] wmask = '0;
  line_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  stt_mram_bank #(.ROWS(ROWS)) dut (
    .clk, .rst_n, .req_i(req), .we_i(we), .row_i(row), .wdata_i(wdata), .wmask_i(wmask),
    .busy_o(busy), .rvalid_o(rvalid), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t rnd_line();
    line_t l;
    for (int w = 0; w < int'(WORDS_PER_LINE); w++) l[w*WORD_BITS +: WORD_BITS] = $urandom;
    return l;
  endfunction

  task automatic do_write(int r, line_t d, logic [WORDS_PER_LINE-1:0] m);
    int busy_cycles = 0;
    @(negedge clk);
    req = 1; we = 1; row = 4'(r); wdata = d; wmask = m;
    @(negedge clk);
    req = 0;
    for (int w = 0; w < int'(WORDS_PER_LINE); w++)
      if (m[w]) ref_mem[r][w*WORD_BITS +: WORD_BITS] = d[w*WORD_BITS +: WORD_BITS];
    while (busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != int'(WRITE_CYCLES) - 1) begin
      failures++;
      $display("write busy %0d cycles after the request, expected %0d", busy_cycles, WRITE_CYCLES - 1);
    end
  endtask

  task automatic do_read(int r);
    int lat = 0;
    @(negedge clk);
    req = 1; we = 0; row = 4'(r);
    @(negedge clk);
    req = 0;
    lat = 1;
    while (!rvalid) begin
      lat++;
      @(negedge clk);
    end
    checks += 2;
    if (lat != int'(READ_CYCLES)) begin
      failures++;
      $display("read latency %0d, expected %0d", lat, READ_CYCLES);
    end
    if (rdata !== ref_mem[r]) begin
      failures++;
      $display("read data mismatch row %0d", r);
    end
    // the bank is free again in the cycle the data arrives
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(ROWS); r++) begin
      ref_mem[r] = '0;
      do_write(r, rnd_line(), '1);
    end
    for (int r = 0; r < int'(ROWS); r++) do_read(r);
    for (int t = 0; t < 60; t++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if ($urandom_range(1)) do_write(r, rnd_line(), WORDS_PER_LINE'($urandom));
      else do_read(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
