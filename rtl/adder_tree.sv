// adder_tree -- balanced binary tree that adds N signed numbers.
//
// This is the adder network of the parallel decision function: after the
// table stage it sums the partial sums of all groups of weak classifiers.
// N-1 adders are arranged as a heap: the inputs, sign-extended to the output
// width and padded with zeros up to a power of two P, are the leaves
// node[P..2P-1], and node[i] = node[2i] + node[2i+1]; node[1] is the sum.
// Depth is clog2(N) adders. The tree shape is this design's choice; the
// description only asks for the additions to be done in parallel.
//
// Interface: din (N signed words of IN_W bits) in, sum (IN_W + clog2(N)
// bits, signed) out, combinational, no clock.
module adder_tree #(
  parameter int unsigned N    = 8,
  parameter int unsigned IN_W = 11,
  localparam int unsigned OUT_W = IN_W + $clog2(N),
  localparam int unsigned P     = (N <= 1) ? 1 : (1 << $clog2(N))
) (
  input  logic [N-1:0][IN_W-1:0] din,
  output logic signed [OUT_W-1:0] sum
);

  logic signed [OUT_W-1:0] node [1:2*P-1];

  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      if (i < N) node[P+i] = OUT_W'(signed'(din[i]));
      else       node[P+i] = '0;
    end
    for (int unsigned i = P - 1; i >= 1; i--) begin
      node[i] = node[2*i] + node[2*i+1];
    end
  end

  assign sum = node[1];

endmodule
