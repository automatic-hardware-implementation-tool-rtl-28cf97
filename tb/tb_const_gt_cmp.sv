// tb_const_gt_cmp -- exhaustive check of the constant comparator.
// Eight comparators with different constants (including the worked example
// 151 and the end values 0 and 255) are driven with every byte value; each
// output is compared with the integer relation a > B.
module tb_const_gt_cmp;

  localparam int NC = 8;
  localparam logic [NC-1:0][7:0] CONSTS = {8'd151, 8'd0, 8'd1, 8'd128,
                                           8'd254, 8'd255, 8'd85, 8'd170};

  logic [7:0]    a;
  logic [NC-1:0] gt;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    const_gt_cmp #(.W(8), .B(CONSTS[i])) dut (.a(a), .gt(gt[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (gt[i] !== (v > int'(CONSTS[i]))) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d B=%0d gt=%0b", v, CONSTS[i], gt[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
