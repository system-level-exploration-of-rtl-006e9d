// Self-checking test of the write buffer: fills it to full, checks first-in
// first-out order, the full and empty flags, the address match used to hold
// back refills, and simultaneous push and pop, against a reference queue.
module tb_write_buffer;
  import dl1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty, match;
  laddr_t push_la = '0, head_la, lk_la = '0;
  line_t push_d = '0, head_d;
  laddr_t q_la[$];
  line_t  q_d[$];
  int checks = 0, failures = 0;

  write_buffer dut (.clk, .rst_n, .push_i(push), .push_laddr_i(push_la), .push_data_i(push_d),
    .full_o(full), .empty_o(empty), .head_laddr_o(head_la), .head_data_o(head_d), .pop_i(pop),
    .lk_laddr_i(lk_la), .match_o(match));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    bit exp_match = 0;
    checks += 3;
    if (empty !== (q_la.size() == 0)) begin failures++; $display("empty flag wrong"); end
    if (full !== (q_la.size() == int'(WB_DEPTH))) begin failures++; $display("full flag wrong"); end
    foreach (q_la[i]) if (q_la[i] == lk_la) exp_match = 1;
    if (match !== exp_match) begin failures++; $display("match wrong"); end
    if (q_la.size() > 0) begin
      checks++;
      if (head_la !== q_la[0] || head_d !== q_d[0]) begin failures++; $display("head wrong"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      push    = ($urandom_range(2) != 0) && (q_la.size() < int'(WB_DEPTH));
      pop     = ($urandom_range(2) != 0) && (q_la.size() > 0);
      push_la = laddr_t'($urandom_range(15));
      push_d  = {16{$urandom}};
      lk_la   = laddr_t'($urandom_range(15));
      #1 check_state();
      @(posedge clk);
      if (pop) begin void'(q_la.pop_front()); void'(q_d.pop_front()); end
      if (push) begin q_la.push_back(push_la); q_d.push_back(push_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
