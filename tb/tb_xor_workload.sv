// tb_xor_workload -- the two-class XOR problem in two features, solved by
// hyperrectangle weak classifiers.
// Class +1 lies in the quadrants (x0 low, x1 high) and (x0 high, x1 low),
// with the split at 128. Three weak classifiers do it:
//   h1 = +1 inside 0 < x0 < 128, 127 < x1 < 255   (alpha 1)
//   h2 = +1 inside 127 < x0 < 255, 0 < x1 < 128   (alpha 1)
//   h3 = +1 always (all bounds open)               (alpha 1)
// so the vote is +1 in the two class-+1 quadrants and -1 elsewhere. The
// model is hand-made (it is not a training result); it shows the classifier
// built for a different size (D = 2, T = 3) and checks it on random points
// against the XOR rule over the whole byte range, the four corners
// included: the bounds at 0 and 255 are open, so the edges belong to the
// boxes.
module tb_xor_workload;

  localparam int D = 2, T = 3, AW = 8;
  localparam logic [T-1:0][D-1:0][7:0] TL = '{'{8'd0, 8'd0},     // h3: x1, x0
                                              '{8'd0, 8'd127},   // h2
                                              '{8'd127, 8'd0}};  // h1
  localparam logic [T-1:0][D-1:0][7:0] TU = '{'{8'd255, 8'd255},
                                              '{8'd128, 8'd255},
                                              '{8'd255, 8'd128}};
  localparam logic [T-1:0]          YH = 3'b111;
  localparam logic [T-1:0][AW-1:0]  AL = {8'd1, 8'd1, 8'd1};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [D-1:0][7:0] x = '0;
  logic out_valid, y_pos;
  logic signed [AW+2:0] score;   // one table group: AW + 3 bits

  adaboost_decision #(.D(D), .T(T), .ALPHA_W(AW), .THETA_L(TL), .THETA_U(TU),
                      .Y_H(YH), .ALPHA(AL)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y_pos(y_pos), .score(score));

  always #10 clk = ~clk;

  bit exp_q[$];
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  always @(posedge clk) begin
    bit e;
    if (rst_n && out_valid) begin
      checks++;
      e = exp_q.pop_front();
      if (y_pos != e) begin
        failures++;
        if (failures < 10) $display("FAIL y=%b exp=%b score=%0d", y_pos, e, score);
      end
      if (e) n_pos++; else n_neg++;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x[0] = 8'($urandom); x[1] = 8'($urandom);
      if (n < 4) begin  // the four corners
        x[0] = ((n & 1) != 0) ? 8'd255 : 8'd0;
        x[1] = ((n & 2) != 0) ? 8'd255 : 8'd0;
      end
      exp_q.push_back((x[0] < 8'd128) != (x[1] < 8'd128));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL left=%0d pos=%0d neg=%0d", exp_q.size(), n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
