// Post-decode multiplexer of the Very Wide Buffer.
//
// The VWB is wide towards the data cache and narrow towards the datapath.
// This network sits between the two: on the read side it picks the word
// selected by `word_sel` out of the selected VWB line, and on the write side
// it merges a processor word into that line, producing the new line value
// and a one-hot word mask. It is purely combinational; a read and a write
// through it complete in the same cycle as the VWB access.
//
// The multiplexer itself follows the original proposal (a MUX after the decoder that
// selects the word); the word width and the byte-free, whole-word write are
// this design's choices.
module vwb_post_decode_mux #(
  parameter int unsigned LINE_BITS = 1024,
  parameter int unsigned WORD_BITS = 32,
  localparam int unsigned WORDS    = LINE_BITS / WORD_BITS,
  localparam int unsigned SEL_BITS = $clog2(WORDS)
) (
  input  logic [LINE_BITS-1:0] line_i,      // selected VWB line
  input  logic [SEL_BITS-1:0]  word_sel_i,  // word within the line
  input  logic [WORD_BITS-1:0] wdata_i,     // processor store word
  output logic [WORD_BITS-1:0] rdata_o,     // word to the datapath
  output logic [LINE_BITS-1:0] line_o,      // line with wdata_i merged in
  output logic [WORDS-1:0]     word_mask_o  // one-hot word that line_o changes
);

  always_comb begin
    rdata_o     = line_i[word_sel_i*WORD_BITS +: WORD_BITS];
    line_o      = line_i;
    line_o[word_sel_i*WORD_BITS +: WORD_BITS] = wdata_i;
    word_mask_o = '0;
    word_mask_o[word_sel_i] = 1'b1;
  end

endmodule
