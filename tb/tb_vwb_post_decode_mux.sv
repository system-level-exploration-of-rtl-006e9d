// Self-checking test of the VWB post-decode multiplexer: for random lines,
// word selects and store words it checks the selected read word, the merged
// line (only the selected word changes) and the one-hot word mask.
module tb_vwb_post_decode_mux;
  localparam int unsigned LB = 1024, WB = 32, WORDS = LB / WB;
  logic [LB-1:0] line_i, line_o;
  logic [4:0]    sel;
  logic [WB-1:0] wdata, rdata;
  logic [WORDS-1:0] mask;
  int checks = 0, failures = 0;

  vwb_post_decode_mux #(.LINE_BITS(LB), .WORD_BITS(WB)) dut (
    .line_i, .word_sel_i(sel), .wdata_i(wdata), .rdata_o(rdata), .line_o, .word_mask_o(mask));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int w = 0; w < WORDS; w++) line_i[w*WB +: WB] = $urandom;
      sel   = 5'($urandom);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== line_i[int'(sel)*WB +: WB]) begin
        failures++;
        $display("read mismatch sel=%0d", sel);
      end
      for (int w = 0; w < WORDS; w++) begin
        checks++;
        if (w == int'(sel)) begin
          if (line_o[w*WB +: WB] !== wdata || mask[w] !== 1'b1) failures++;
        end else begin
          if (line_o[w*WB +: WB] !== line_i[w*WB +: WB] || mask[w] !== 1'b0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
