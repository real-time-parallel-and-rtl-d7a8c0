// tb_da_cmul: exhaustive test of the distributed-arithmetic multiplier.
// Every 12-bit input is applied to two instances with different constant
// pairs; each product must be within 1.25 LSB of the exact real product.
module tb_da_cmul;
  localparam int  W = 12;
  localparam real A0 = 0.9238795325, A1 = -0.3826834324;
  localparam real B0 = 0.1767766953, B1 = 0.0;
  logic signed [W-1:0] x, pa0, pa1, pb0, pb1;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  da_cmul #(.W(W), .C0(A0), .C1(A1)) dut_a (.x(x), .p0(pa0), .p1(pa1));
  da_cmul #(.W(W), .C0(B0), .C1(B1)) dut_b (.x(x), .p0(pb0), .p1(pb1));

  task automatic chk(logic signed [W-1:0] got, real exp);
    real e = real'(got) - exp;
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > 1.25) begin
      failures++;
      if (failures < 10) $display("MISMATCH x=%0d got %0d exp %f", x, got, exp);
    end
  endtask

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      x = W'(v);
      #1;
      chk(pa0, A0 * v);
      chk(pa1, A1 * v);
      chk(pb0, B0 * v);
      chk(pb1, 0.0);
    end
    $display("max abs error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
