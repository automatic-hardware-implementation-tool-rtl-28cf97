// feature_word_loader -- assembles a feature vector from a 32-bit bus.
//
// When the classifier is used as a coprocessor on a 32-bit bus, one bus word
// carries four byte features, so a D-feature vector arrives as
// NW = ceil(D/4) words and one decision needs NW bus cycles. This block
// collects those words into a D-byte register and raises feat_valid for one
// clock once the last word is in.
//
// Byte k of word i (bits 8k+7..8k) becomes feature 4i+k; bytes beyond
// feature D-1 in the last word are ignored. word_sof marks the first word of
// a vector and restarts the word count, so a lost word cannot misalign the
// following vectors; without it the count simply wraps after NW words.
// Byte order, framing and the one-clock output pulse are this design's
// choices; the bus itself (e.g. PCI at 33 MHz) is not part of this block.
//
// Timing: feat_valid is high in the clock after the last word is accepted,
// and feat holds the complete vector during that clock. A new word may be
// accepted in every clock, including that one.
//
// Interface: clk, rst_n (asynchronous, active low); word_valid, word_sof,
// word in; feat_valid, feat (D bytes) out.
module feature_word_loader
  import adaboost_pkg::*;
#(
  parameter int unsigned D = 64,
  localparam int unsigned NW    = (D + FEAT_PER_WORD - 1) / FEAT_PER_WORD,
  localparam int unsigned IDX_W = (NW <= 1) ? 1 : $clog2(NW)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     word_valid,
  input  logic                     word_sof,
  input  logic [BUS_W-1:0]         word,
  output logic                     feat_valid,
  output logic [D-1:0][FEAT_W-1:0] feat
);

  logic [IDX_W-1:0] cnt_q;
  logic [IDX_W-1:0] idx;

  assign idx = word_sof ? '0 : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      feat_valid <= 1'b0;
      feat       <= '0;
    end else begin
      feat_valid <= 1'b0;
      if (word_valid) begin
        for (int unsigned k = 0; k < FEAT_PER_WORD; k++) begin
          if (int'(idx) * FEAT_PER_WORD + k < D)
            feat[int'(idx) * FEAT_PER_WORD + k] <= word[k*FEAT_W +: FEAT_W];
        end
        if (int'(idx) == NW - 1) begin
          cnt_q      <= '0;
          feat_valid <= 1'b1;
        end else begin
          cnt_q <= idx + 1'b1;
        end
      end
    end
  end

endmodule
