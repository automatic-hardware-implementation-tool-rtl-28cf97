// tb_adder_tree -- random and extreme signed inputs into trees of 5, 8 and
// 1 inputs; each sum is compared with an integer sum.
module tb_adder_tree;

  localparam int W = 11;

  logic [4:0][W-1:0] d5;
  logic [7:0][W-1:0] d8;
  logic [0:0][W-1:0] d1;
  logic signed [W+2:0] s5, s8;
  logic signed [W-1:0] s1;
  int checks = 0, failures = 0;

  adder_tree #(.N(5), .IN_W(W)) dut5 (.din(d5), .sum(s5));
  adder_tree #(.N(8), .IN_W(W)) dut8 (.din(d8), .sum(s8));
  adder_tree #(.N(1), .IN_W(W)) dut1 (.din(d1), .sum(s1));

  task automatic check();
    int r5 = 0, r8 = 0;
    #1;
    for (int i = 0; i < 5; i++) r5 += int'(signed'(d5[i]));
    for (int i = 0; i < 8; i++) r8 += int'(signed'(d8[i]));
    checks += 3;
    if (int'(s5) != r5) begin failures++; $display("FAIL n5 %0d exp %0d", s5, r5); end
    if (int'(s8) != r8) begin failures++; $display("FAIL n8 %0d exp %0d", s8, r8); end
    if (int'(s1) != int'(signed'(d1[0]))) begin failures++; $display("FAIL n1"); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 5; i++) d5[i] = W'($urandom);
      for (int i = 0; i < 8; i++) d8[i] = W'($urandom);
      d1[0] = W'($urandom);
      check();
    end
    // extremes: all most negative, all most positive
    d5 = {5{1'b1, {(W-1){1'b0}}}}; d8 = {8{1'b1, {(W-1){1'b0}}}}; d1 = '0;
    check();
    d5 = {5{1'b0, {(W-1){1'b1}}}}; d8 = {8{1'b0, {(W-1){1'b1}}}}; d1 = '1;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
