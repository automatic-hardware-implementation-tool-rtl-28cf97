// adaboost_top -- Adaboost decision function with its two feature inputs.
//
// The classifier (adaboost_decision) is meant to sit next to a feature
// extractor on the same chip, receiving all D byte features of a pixel or
// sample in parallel every clock. It can also serve as a coprocessor on a
// 32-bit bus, where the features arrive four per word; feature_word_loader
// then rebuilds the vector first. src_sel picks the source:
//   src_sel = 0 (SRC_PARALLEL): parallel input feat/feat_valid, one
//     decision per clock;
//   src_sel = 1 (SRC_BUS): bus input word/word_valid/word_sof, one
//     decision per ceil(D/4) words.
// The static source select is this design's choice.
//
// Timing: out_valid follows the accepted feature vector by 2 clocks
// (parallel input), or by 3 clocks after the last bus word (one more clock
// in the loader).
//
// Parameters: D features, T weak classifiers, ALPHA_W bits per weight and the
// learned constants, passed through to adaboost_decision; the defaults are
// the package's default model.
//
// Interface: clk, rst_n (asynchronous, active low); src_sel; feat_valid,
// feat; word_valid, word_sof, word; out_valid, y_pos (1: class +1), score.
module adaboost_top
  import adaboost_pkg::*;
#(
  parameter int unsigned D       = 64,
  parameter int unsigned T       = 32,
  parameter int unsigned ALPHA_W = 8,
  parameter logic [T-1:0][D-1:0][FEAT_W-1:0] THETA_L =
    (T*D*FEAT_W)'(dflt_lower_all(T, D)),
  parameter logic [T-1:0][D-1:0][FEAT_W-1:0] THETA_U =
    (T*D*FEAT_W)'(dflt_upper_all(T, D)),
  parameter logic [T-1:0]                    Y_H     = T'(dflt_class_all(T)),
  parameter logic [T-1:0][ALPHA_W-1:0]       ALPHA   =
    (T*ALPHA_W)'(dflt_alpha_all(T, ALPHA_W)),
  localparam int unsigned NG      = (T + LUT_IN - 1) / LUT_IN,
  localparam int unsigned SCORE_W = ALPHA_W + $clog2(LUT_IN) + 1 + $clog2(NG)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       src_sel,
  input  logic                       feat_valid,
  input  logic [D-1:0][FEAT_W-1:0]   feat,
  input  logic                       word_valid,
  input  logic                       word_sof,
  input  logic [BUS_W-1:0]           word,
  output logic                       out_valid,
  output logic                       y_pos,
  output logic signed [SCORE_W-1:0]  score
);

  src_e src;
  assign src = src_e'(src_sel);

  logic                     bus_valid;
  logic [D-1:0][FEAT_W-1:0] bus_feat;

  feature_word_loader #(.D(D)) u_loader (
    .clk        (clk),
    .rst_n      (rst_n),
    .word_valid (word_valid && src == SRC_BUS),
    .word_sof   (word_sof),
    .word       (word),
    .feat_valid (bus_valid),
    .feat       (bus_feat)
  );

  logic                     dec_valid;
  logic [D-1:0][FEAT_W-1:0] dec_x;

  always_comb begin
    if (src == SRC_BUS) begin
      dec_valid = bus_valid;
      dec_x     = bus_feat;
    end else begin
      dec_valid = feat_valid;
      dec_x     = feat;
    end
  end

  adaboost_decision #(
    .D       (D),
    .T       (T),
    .ALPHA_W (ALPHA_W),
    .THETA_L (THETA_L),
    .THETA_U (THETA_U),
    .Y_H     (Y_H),
    .ALPHA   (ALPHA)
  ) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_valid),
    .x         (dec_x),
    .out_valid (out_valid),
    .y_pos     (y_pos),
    .score     (score)
  );

endmodule
