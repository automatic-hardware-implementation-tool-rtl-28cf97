// weak_classifier -- one generalised-hyperrectangle weak classifier h_t.
//
// A hyperrectangle is a box of 2*D thresholds plus a class y_H. The output is
// y_H when every feature lies strictly inside its interval,
//   theta_l[d] < x[d] < theta_u[d]  for all d,
// and -y_H otherwise. All comparisons run in parallel and are ANDed.
// A single threshold (h = y when x[d] < theta) and a single interval are the
// same block with all other bounds left open.
//
// A lower bound of 0 or an upper bound of 255 counts as "rejected to
// infinity": no comparator is built and that side is always satisfied. This
// is how the design saves slices; note that it means x = 0 passes an open
// lower bound, where a literal x > 0 would not. Each remaining bound is a
// constant comparator (const_gt_cmp); an upper bound uses it on the inverted
// feature. NUM_CMP reports how many comparators were built (mu_t), the
// cost figure of this weak classifier; nothing inside reads it. Features
// whose two bounds are open are not read at all, so lint reports those bits
// of x as unused: that is the intended saving, not an error.
//
// The thresholds and the class are parameters, fixed per training run, as
// the design intends. The default box is the third classifier of the
// package's default model, a general hyperrectangle. The output encoding
// (1 = +1, 0 = -1) is this design's choice.
//
// Interface: x (D bytes) in, h and in_box out, combinational, no clock.
module weak_classifier
  import adaboost_pkg::*;
#(
  parameter int unsigned D = 64,
  parameter logic [D-1:0][FEAT_W-1:0] THETA_L =
    (D*FEAT_W)'(dflt_lower_all(3, D) >> (2*D*FEAT_W)),
  parameter logic [D-1:0][FEAT_W-1:0] THETA_U =
    (D*FEAT_W)'(dflt_upper_all(3, D) >> (2*D*FEAT_W)),
  parameter logic Y_H = 1'b1
) (
  input  logic [D-1:0][FEAT_W-1:0] x,
  output logic                     h,        // 1: +1, 0: -1
  output logic                     in_box    // x lies in the box
);

  function automatic int unsigned count_cmp();
    int unsigned n;
    n = 0;
    for (int unsigned d = 0; d < D; d++) n += bound_count(THETA_L[d], THETA_U[d]);
    return n;
  endfunction

  localparam int unsigned NUM_CMP = count_cmp();

  logic [D-1:0] lo_ok, hi_ok;

  for (genvar d = 0; d < D; d++) begin : g_feat
    if (THETA_L[d] != FEAT_MIN) begin : g_lo
      const_gt_cmp #(.W(FEAT_W), .B(THETA_L[d])) u_lo (.a(x[d]), .gt(lo_ok[d]));
    end else begin : g_lo_open
      assign lo_ok[d] = 1'b1;
    end
    if (THETA_U[d] != FEAT_MAX) begin : g_hi
      const_gt_cmp #(.W(FEAT_W), .B(~THETA_U[d])) u_hi (.a(~x[d]), .gt(hi_ok[d]));
    end else begin : g_hi_open
      assign hi_ok[d] = 1'b1;
    end
  end

  assign in_box = &(lo_ok & hi_ok);
  assign h      = in_box ? Y_H : ~Y_H;

endmodule
