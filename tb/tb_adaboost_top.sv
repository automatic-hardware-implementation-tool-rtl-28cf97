// tb_adaboost_top -- end-to-end test of the whole classifier at its default
// size (D = 64 features, T = 32 weak classifiers, default model, no
// parameter overrides).
//   Phase 1, src_sel = 0: feature vectors on the parallel input, back to
//     back and with gaps; bus words sent meanwhile must be ignored.
//   Phase 2, src_sel = 1: the same kind of vectors as 16 bus words each,
//     with gaps, plus one vector cut short and the next one re-aligned by
//     word_sof.
// Every result is compared with the integer reference model, with a latency
// of 2 clocks from the parallel input and 3 clocks from the last bus word.
// Each mechanism is counted and the test fails if one never happened:
// parallel and bus decisions, back-to-back input, bus gaps, ignored bus
// words, word_sof re-alignment, both classes, and in-box hits of all three
// weak-classifier kinds.
module tb_adaboost_top;
  import adaboost_pkg::*;
  import tb_adaboost_ref_pkg::*;

  localparam int D = 64, T = 32, AW = 8, NW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic src_sel = 1'b0, feat_valid = 1'b0;
  logic [D-1:0][7:0] feat = '0;
  logic word_valid = 1'b0, word_sof = 1'b0;
  logic [31:0] word = '0;
  logic out_valid, y_pos;
  logic signed [13:0] score;   // 8 + 3 + clog2(32/4) bits

  adaboost_top dut (
    .clk(clk), .rst_n(rst_n), .src_sel(src_sel),
    .feat_valid(feat_valid), .feat(feat),
    .word_valid(word_valid), .word_sof(word_sof), .word(word),
    .out_valid(out_valid), .y_pos(y_pos), .score(score)
  );

  always #10 clk = ~clk;   // 50 MHz

  typedef struct { int score; int stamp; int lat; } exp_t;
  exp_t q[$];
  int cyc = 0, checks = 0, failures = 0;
  int n_par = 0, n_bus = 0, n_pos = 0, n_neg = 0, n_b2b = 0, n_gap = 0;
  int n_ignored = 0, n_resync = 0;
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
        if (int'(score) != e.score || y_pos != (e.score >= 0) || cyc - e.stamp != e.lat) begin
          failures++;
          if (failures < 10)
            $display("FAIL score=%0d y=%b exp=%0d latency=%0d/%0d", score, y_pos, e.score,
                     cyc - e.stamp, e.lat);
        end
        if (e.score >= 0) n_pos++; else n_neg++;
      end
    end
  end

  function automatic void expect_result(fvec_t v, int lat);
    exp_t e;
    e.score = ref_score(v, T, D, AW);
    e.stamp = cyc + 1;
    e.lat   = lat;
    q.push_back(e);
    for (int t = 0; t < T; t++) if (ref_in_box(v, t, D)) kind_hits[dflt_kind(t)]++;
  endfunction

  task automatic send_parallel(fvec_t v);
    @(negedge clk);
    if (feat_valid) n_b2b++;
    feat_valid = 1'b1;
    feat = v[D-1:0];
    // a bus word at the same time must not disturb anything
    word_valid = 1'b1; word_sof = 1'b1; word = $urandom;
    n_ignored++;
    expect_result(v, 2);
    n_par++;
  endtask

  task automatic send_bus(fvec_t v, int nwords, bit gaps);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      word_valid = 1'b1;
      word_sof   = (i == 0);
      word       = v[4*i +: 4];
      feat_valid = 1'b1; feat = '1;     // parallel input must be ignored
      if (i == NW - 1) begin
        expect_result(v, 3);
        n_bus++;
      end
      if (gaps && ($urandom % 4 == 0)) begin
        @(negedge clk);
        word_valid = 1'b0;
        n_gap++;
      end
    end
  endtask

  task automatic idle();
    @(negedge clk);
    feat_valid = 1'b0;
    word_valid = 1'b0;
  endtask

  function automatic fvec_t pick(int n);
    return (n % 2) ? inside_vector(n % T, D) : random_vector(D);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // phase 1: parallel input
    for (int n = 0; n < 200; n++) begin
      send_parallel(pick(n));
      if ($urandom % 4 == 0) idle();
    end
    idle();
    repeat (5) @(posedge clk);
    // phase 2: bus input
    @(negedge clk) src_sel = 1'b1;
    for (int n = 0; n < 100; n++) begin
      if (n == 50) begin
        send_bus(random_vector(D), 7, 1'b0);   // cut short, never completes
        n_resync++;
      end
      send_bus(pick(n), NW, 1'b1);
    end
    idle();
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("parallel=%0d bus=%0d +1=%0d -1=%0d back-to-back=%0d bus-gaps=%0d",
             n_par, n_bus, n_pos, n_neg, n_b2b, n_gap);
    $display("ignored-words=%0d resync=%0d box hits thr/int/rect=%0d/%0d/%0d",
             n_ignored, n_resync, kind_hits[0], kind_hits[1], kind_hits[2]);
    checks++;
    if (n_par == 0 || n_bus == 0 || n_pos == 0 || n_neg == 0 || n_b2b == 0 ||
        n_gap == 0 || n_ignored == 0 || n_resync == 0 ||
        kind_hits[0] == 0 || kind_hits[1] == 0 || kind_hits[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
