// tb_alpha_lut -- exhaustive check of the alpha lookup table for a full
// group of four (alphas 200, 3, 77, 255) and a group of two padded with
// zero weights. Each of the 16 addresses is compared with the signed sum
// of +alpha for a 1 bit and -alpha for a 0 bit.
module tb_alpha_lut;

  localparam logic [3:0][7:0] A0 = {8'd255, 8'd77, 8'd3, 8'd200};
  localparam logic [3:0][7:0] A1 = {8'd0, 8'd0, 8'd9, 8'd130};

  logic [3:0] h;
  logic signed [10:0] p0, p1;
  int checks = 0, failures = 0;

  alpha_lut #(.G(4), .ALPHA_W(8), .ALPHA(A0)) dut0 (.h(h), .psum(p0));
  alpha_lut #(.G(4), .ALPHA_W(8), .ALPHA(A1)) dut1 (.h(h), .psum(p1));

  function automatic int ref_sum(logic [3:0] hv, logic [3:0][7:0] a);
    int s = 0;
    for (int g = 0; g < 4; g++) s += hv[g] ? int'(a[g]) : -int'(a[g]);
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      h = 4'(v);
      #1;
      checks += 2;
      if (int'(p0) != ref_sum(h, A0)) begin
        failures++;
        $display("FAIL lut0 h=%b psum=%0d exp=%0d", h, p0, ref_sum(h, A0));
      end
      if (int'(p1) != ref_sum(h, A1)) begin
        failures++;
        $display("FAIL lut1 h=%b psum=%0d exp=%0d", h, p1, ref_sum(h, A1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
