// tb_weak_classifier -- checks three weak classifiers on 6 features:
// a general hyperrectangle (class +1, some bounds open), a single threshold
// (class -1, x[2] < 100) and a single interval (class +1, 40 < x[5] < 42,
// which only x[5] = 41 satisfies). Inputs are random, plus edge values at and next
// to every bound; outputs are compared with the strict-inequality rule,
// open bounds (0 / 255) always satisfied.
module tb_weak_classifier;

  localparam int D = 6;
  typedef logic [D-1:0][7:0] vec_t;

  localparam vec_t L0 = {8'd10, 8'd0,   8'd200, 8'd0,   8'd1,   8'd50};
  localparam vec_t U0 = {8'd255, 8'd90, 8'd250, 8'd255, 8'd254, 8'd150};
  localparam vec_t L1 = '0;
  localparam vec_t U1 = {8'd255, 8'd255, 8'd255, 8'd100, 8'd255, 8'd255};
  localparam vec_t L2 = {8'd40, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam vec_t U2 = {8'd42, 8'd255, 8'd255, 8'd255, 8'd255, 8'd255};

  vec_t x;
  logic [2:0] h, in_box;
  int checks = 0, failures = 0, hits = 0;

  weak_classifier #(.D(D), .THETA_L(L0), .THETA_U(U0), .Y_H(1'b1))
    dut0 (.x(x), .h(h[0]), .in_box(in_box[0]));
  weak_classifier #(.D(D), .THETA_L(L1), .THETA_U(U1), .Y_H(1'b0))
    dut1 (.x(x), .h(h[1]), .in_box(in_box[1]));
  weak_classifier #(.D(D), .THETA_L(L2), .THETA_U(U2), .Y_H(1'b1))
    dut2 (.x(x), .h(h[2]), .in_box(in_box[2]));

  function automatic logic ref_in(vec_t v, vec_t l, vec_t u);
    logic r = 1'b1;
    for (int d = 0; d < D; d++) begin
      if (l[d] != 8'd0   && !(v[d] > l[d])) r = 1'b0;
      if (u[d] != 8'd255 && !(v[d] < u[d])) r = 1'b0;
    end
    return r;
  endfunction

  task automatic check_one();
    logic [2:0] exp_in, exp_h;
    #1;
    exp_in[0] = ref_in(x, L0, U0);
    exp_in[1] = ref_in(x, L1, U1);
    exp_in[2] = ref_in(x, L2, U2);
    exp_h[0]  = exp_in[0];
    exp_h[1]  = ~exp_in[1];
    exp_h[2]  = exp_in[2];
    hits += int'(exp_in[0]);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (h[i] !== exp_h[i] || in_box[i] !== exp_in[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL wc%0d x=%h h=%b exp=%b", i, x, h[i], exp_h[i]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // random vectors
    for (int n = 0; n < 3000; n++) begin
      for (int d = 0; d < D; d++) x[d] = 8'($urandom);
      check_one();
    end
    // vectors built inside box 0, with one feature moved to/around a bound
    for (int d = 0; d < D; d++) begin
      for (int off = -1; off <= 1; off++) begin
        for (int side = 0; side < 2; side++) begin
          for (int k = 0; k < D; k++) x[k] = 8'((int'(L0[k]) + int'(U0[k])) / 2);
          x[d] = 8'((side ? int'(U0[d]) : int'(L0[d])) + off);
          check_one();
        end
      end
    end
    // threshold and interval edges
    for (int v = 0; v < 256; v++) begin
      x = '0; x[2] = 8'(v); x[5] = 8'(v);
      check_one();
    end
    if (hits == 0) begin
      failures++;
      $display("FAIL: box 0 never hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
