// adaboost_decision -- fully parallel Adaboost strong classifier
//   y(x) = sgn( sum_{t=1..T} alpha_t * h_t(x) ),  h_t(x) in {-1,+1}.
//
// Structure, following the parallel architecture of the design:
//   * T weak classifiers (weak_classifier) evaluate their hyperrectangles on
//     the D byte features at the same time; each is a set of constant
//     comparators, so only bounds that are not open cost logic.
//   * The h_t bits are taken in groups of G = 4; each group addresses an
//     alpha_lut whose entries are the pre-computed signed sums of its
//     alphas, so the first level of additions costs no adder.
//   * An adder tree (adder_tree) sums the ceil(T/G) partial sums and the
//     sign bit of the total gives the class.
// All learned constants (bounds, classes, alphas) are parameters: a new
// training run is a new set of parameters, i.e. a new circuit.
//
// Timing (this design's choice): two register stages. Stage 1 registers
// the partial sums of the table stage, stage 2 registers the score and the
// class. One feature vector is accepted every clock; out_valid follows
// in_valid by exactly 2 clocks. At the 50 MHz clock the design is evaluated
// at, that is one decision per 20 ns.
// sgn(0) is taken as +1 (y_pos = 1), also this design's choice.
// Reset: asynchronous, active low; it clears the valid flags and the
// registered data.
//
// Interface: clk, rst_n; in_valid, x (D bytes); out_valid, y_pos
// (1: class +1, 0: class -1), score (signed weighted vote).
module adaboost_decision
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
  localparam int unsigned G       = LUT_IN,
  localparam int unsigned NG      = (T + G - 1) / G,
  localparam int unsigned PSUM_W  = ALPHA_W + $clog2(G) + 1,
  localparam int unsigned SCORE_W = PSUM_W + $clog2(NG)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [D-1:0][FEAT_W-1:0]     x,
  output logic                         out_valid,
  output logic                         y_pos,
  output logic signed [SCORE_W-1:0]    score
);

  // Alphas padded with zeros to a whole number of groups.
  function automatic logic [NG*G-1:0][ALPHA_W-1:0] padded_alpha();
    logic [NG*G-1:0][ALPHA_W-1:0] r;
    r = '0;
    for (int unsigned t = 0; t < T; t++) r[t] = ALPHA[t];
    return r;
  endfunction

  localparam logic [NG*G-1:0][ALPHA_W-1:0] ALPHA_P = padded_alpha();

  // ---------------------------------------------------------------- stage 1
  logic [NG*G-1:0] h;

  for (genvar t = 0; t < T; t++) begin : g_wc
    logic unused_in_box;
    weak_classifier #(
      .D       (D),
      .THETA_L (THETA_L[t]),
      .THETA_U (THETA_U[t]),
      .Y_H     (Y_H[t])
    ) u_wc (
      .x      (x),
      .h      (h[t]),
      .in_box (unused_in_box)
    );
  end

  for (genvar t = T; t < NG * G; t++) begin : g_pad
    assign h[t] = 1'b0;   // weight 0: contributes -0
  end

  logic [NG-1:0][PSUM_W-1:0] psum, psum_q;
  logic                      v1_q;

  for (genvar g = 0; g < NG; g++) begin : g_lut
    alpha_lut #(
      .G       (G),
      .ALPHA_W (ALPHA_W),
      .ALPHA   (ALPHA_P[g*G +: G])
    ) u_lut (
      .h    (h[g*G +: G]),
      .psum (psum[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      psum_q <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) psum_q <= psum;
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic signed [SCORE_W-1:0] total;

  adder_tree #(
    .N    (NG),
    .IN_W (PSUM_W)
  ) u_tree (
    .din (psum_q),
    .sum (total)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_pos     <= 1'b0;
      score     <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        score <= total;
        y_pos <= ~total[SCORE_W-1];
      end
    end
  end

endmodule
