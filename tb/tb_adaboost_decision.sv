// tb_adaboost_decision -- runs the decision function at its default size
// (D = 64 features, T = 32 weak classifiers, default model) and compares
// every score and class with the integer reference model. Vectors are random
// or placed inside the box of a chosen weak classifier; they are sent back
// to back and with gaps. The 2-clock latency is checked for each result,
// and the test fails if either class or any kind of weak classifier
// (threshold, interval, hyperrectangle) never fired.
module tb_adaboost_decision;
  import adaboost_pkg::*;
  import tb_adaboost_ref_pkg::*;

  localparam int D = 64, T = 32, AW = 8, LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [D-1:0][7:0] x = '0;
  logic out_valid, y_pos;
  logic signed [13:0] score;   // 8 + 3 + clog2(32/4) bits

  adaboost_decision dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y_pos(y_pos), .score(score)
  );

  always #10 clk = ~clk;   // 50 MHz

  typedef struct { int score; int stamp; } exp_t;
  exp_t q[$];
  int cyc = 0, checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_b2b = 0;
  int kind_hits [3] = '{0, 0, 0};

  always @(posedge clk) begin
    exp_t e;
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (int'(score) != e.score || y_pos != (e.score >= 0) || cyc - e.stamp != LAT) begin
          failures++;
          if (failures < 10)
            $display("FAIL score=%0d y=%b exp=%0d latency=%0d", score, y_pos, e.score,
                     cyc - e.stamp);
        end
        if (e.score >= 0) n_pos++; else n_neg++;
      end
    end
  end

  task automatic send(fvec_t v);
    exp_t e;
    @(negedge clk);
    if (in_valid) n_b2b++;
    in_valid = 1'b1;
    x = v[D-1:0];
    e.score = ref_score(v, T, D, AW);
    e.stamp = cyc + 1;
    q.push_back(e);
    for (int t = 0; t < T; t++) if (ref_in_box(v, t, D)) kind_hits[dflt_kind(t)]++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    x = random_vector(D)[D-1:0];
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) send(random_vector(D));
    for (int n = 0; n < 300; n++) begin
      send(inside_vector(n % T, D));
      if ($urandom % 3 == 0) idle();
    end
    idle();
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_b2b == 0 ||
        kind_hits[0] == 0 || kind_hits[1] == 0 || kind_hits[2] == 0) begin
      failures++;
      $display("FAIL coverage pos=%0d neg=%0d b2b=%0d hits=%0d/%0d/%0d", n_pos, n_neg,
               n_b2b, kind_hits[0], kind_hits[1], kind_hits[2]);
    end
    $display("results +1=%0d -1=%0d back-to-back=%0d box hits thr/int/rect=%0d/%0d/%0d",
             n_pos, n_neg, n_b2b, kind_hits[0], kind_hits[1], kind_hits[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
