// tb_feature_word_loader -- loads feature vectors of D = 10 bytes (3 words,
// the last one half used) and checks the assembled vector, the one-clock
// feat_valid pulse one clock after the last word, back-to-back vectors,
// gaps between words, and resynchronisation by word_sof after a vector
// that was cut short.
module tb_feature_word_loader;

  localparam int D  = 10;
  localparam int NW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic word_valid = 1'b0, word_sof = 1'b0;
  logic [31:0] word = '0;
  logic feat_valid;
  logic [D-1:0][7:0] feat;
  int checks = 0, failures = 0, pulses = 0, expected_pulses = 0;

  feature_word_loader #(.D(D)) dut (
    .clk(clk), .rst_n(rst_n), .word_valid(word_valid), .word_sof(word_sof),
    .word(word), .feat_valid(feat_valid), .feat(feat)
  );

  always #5 clk = ~clk;

  logic [D-1:0][7:0] expv;
  logic              exp_pulse = 1'b0;

  // expected-vs-actual on every clock
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (feat_valid !== exp_pulse) begin
      failures++;
      $display("FAIL %0t feat_valid=%b exp=%b", $time, feat_valid, exp_pulse);
    end else if (feat_valid) begin
      pulses++;
      checks++;
      if (feat !== expv) begin
        failures++;
        $display("FAIL vector %h exp %h", feat, expv);
      end
    end
  end

  // Inputs change at the falling edge; expectations are updated right
  // after the rising edge that accepts a word.
  task automatic send_vector(int nwords, bit gaps);
    logic [D-1:0][7:0] v;
    for (int d = 0; d < D; d++) v[d] = 8'($urandom);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      word_valid = 1'b1;
      word_sof   = (i == 0);
      for (int k = 0; k < 4; k++)
        word[k*8 +: 8] = (4*i + k < D) ? v[4*i + k] : 8'($urandom);
      @(posedge clk);
      exp_pulse <= (i == NW - 1);
      if (i == NW - 1) begin
        expv <= v;
        expected_pulses++;
      end
      if (gaps && ($urandom % 2)) begin
        @(negedge clk);
        word_valid = 1'b0;
        @(posedge clk);
        exp_pulse <= 1'b0;
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) send_vector(NW, 1'b0);   // back to back
    for (int n = 0; n < 20; n++) send_vector(NW, 1'b1);   // with gaps
    send_vector(2, 1'b0);                                  // cut short
    for (int n = 0; n < 5; n++) send_vector(NW, 1'b0);    // sof resyncs
    @(negedge clk);
    word_valid = 1'b0;
    @(posedge clk);
    exp_pulse <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulses=%0d expected=%0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
