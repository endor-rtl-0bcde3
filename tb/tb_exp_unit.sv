// tb_exp_unit: sweeps x over [-20, +1] in Q8.8 and compares the fixed-point
// exponential with the real-valued e^x (positive x must give 1.0).
module tb_exp_unit;
  import endor_pkg::*;
  data_t x;
  logic [16:0] y;
  int checks = 0, failures = 0;

  exp_unit dut (.x, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, got, tol, xr;
    for (int v = 256; v >= -20 * 256; v -= 7) begin
      x = data_t'(v);
      #1;
      xr  = real'(v) / 256.0;
      r   = (v > 0) ? 1.0 : $exp(xr);
      got = real'(y) / 65536.0;
      tol = 0.008 * r + 0.0002;
      checks++;
      if (got - r > tol || r - got > tol) begin
        failures++;
        if (failures < 10) $display("FAIL x=%f got %f expected %f", xr, got, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
