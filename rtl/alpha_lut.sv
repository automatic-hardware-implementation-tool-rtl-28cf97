// alpha_lut -- first adder stage of the decision function: the signed sum
// of the weights of G weak classifiers, read from a table.
//
// Each weak classifier output h_t is +1 or -1, so the products alpha_t*h_t
// need no multiplier, and because the G outputs are single bits the sum
//   psum = sum_{g<G} (h[g] ? +ALPHA[g] : -ALPHA[g])
// takes only 2**G values. They are computed at elaboration from the
// learned alphas and stored in a table addressed by the h bits. With G = 4
// every output bit is one 16-bit FPGA lookup table, which is how the design
// folds the first level of additions and subtractions into the fabric.
//
// Alphas are unsigned integers of ALPHA_W bits (a fixed-point scaling of
// the learned real weights, which is this design's choice); psum is two's
// complement, ALPHA_W + clog2(G) + 1 bits wide. Unused inputs of a partly
// filled group get ALPHA = 0.
//
// Interface: h (G bits, 1 = +1) in, psum out, combinational, no clock.
module alpha_lut
  import adaboost_pkg::*;
#(
  parameter int unsigned G       = LUT_IN,
  parameter int unsigned ALPHA_W = 8,
  parameter logic [G-1:0][ALPHA_W-1:0] ALPHA =
    (G*ALPHA_W)'(dflt_alpha_all(G, ALPHA_W)),
  localparam int unsigned OUT_W = ALPHA_W + $clog2(G) + 1
) (
  input  logic [G-1:0]             h,
  output logic signed [OUT_W-1:0]  psum
);

  // Table entry for address a: the signed sum the h pattern a selects.
  function automatic logic [2**G-1:0][OUT_W-1:0] build_table();
    logic [2**G-1:0][OUT_W-1:0] tab;
    for (int unsigned a = 0; a < 2**G; a++) begin
      logic signed [OUT_W-1:0] s;
      s = '0;
      for (int unsigned g = 0; g < G; g++) begin
        if (a[g]) s = s + signed'(OUT_W'(ALPHA[g]));
        else      s = s - signed'(OUT_W'(ALPHA[g]));
      end
      tab[a] = s;
    end
    return tab;
  endfunction

  localparam logic [2**G-1:0][OUT_W-1:0] TABLE = build_table();

  assign psum = signed'(TABLE[h]);

endmodule
