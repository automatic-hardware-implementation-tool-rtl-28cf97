// const_gt_cmp -- compares a variable word A with a constant B fixed at
// elaboration and reports A > B.
//
// Because B is a constant, the comparison reduces to a chain of two-input
// gates, one per bit of A, evaluated from the least significant bit up:
//   L = A[W-1] @ (A[W-2] @ ( ... (A[0] @ 0)))
// where "@" is AND at a bit where B holds a 1 and OR where B holds a 0.
// For B = 151 (1001_0111b) this gives L = A7 & (A6 | (A5 | (A4 & A3))):
// the low 1-bits AND into the constant 0 and vanish. On an FPGA the whole
// chain of a byte fits into two cascaded 4-input lookup tables, one slice.
// That structure follows the design description; the comparator holds no
// state and has no clock.
//
// A "less than" test x < B is made with the same block on the inverted
// operand: x < B  <=>  ~x > ~B.
//
// Interface: a (W bits) in, gt out, combinational.
module const_gt_cmp #(
  parameter int unsigned W = 8,
  parameter logic [W-1:0] B = W'(151)
) (
  input  logic [W-1:0] a,
  output logic         gt
);

  // chain[i] is the result of comparing a[i-1:0] with B[i-1:0]
  logic [W:0] chain;

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (B[i]) begin : g_and
      assign chain[i+1] = a[i] & chain[i];
    end else begin : g_or
      assign chain[i+1] = a[i] | chain[i];
    end
  end

  assign gt = chain[W];

endmodule
