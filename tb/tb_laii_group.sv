// tb_laii_group: checks both halves of lattice array II (and so laii_module)
// against the lattice update equations evaluated in floating point:
//   Xbar_c = X_c + d (2/N) cos(pi k/2N),  Xbar_sc = X_sc + d (2/N) sin(pi k/2N)
//   X_c' = Xbar_c cos(pi k/N) + Xbar_sc sin(pi k/N)
//   X_sc' = -Xbar_c sin(pi k/N) + Xbar_sc cos(pi k/N)
// with the k = 0 / k = N special case and the zeroing of the state by first.
module tb_laii_group;
  localparam int  N = 8, W = 12, M = N / 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 2.5;   // LSB
  logic first = 0;
  logic signed [W-1:0] de [M], ce [M], se [M], ceo [M], seo [M];
  logic signed [W-1:0] dd [M], co [M], so [M], coo [M], soo [M];
  int checks = 0, failures = 0;

  laii_group #(.N(N), .W(W), .ODD(1'b0)) dut_e (.first(first), .delta(de), .xc_in(ce), .xs_in(se), .xc_out(ceo), .xs_out(seo));
  laii_group #(.N(N), .W(W), .ODD(1'b1)) dut_o (.first(first), .delta(dd), .xc_in(co), .xs_in(so), .xc_out(coo), .xs_out(soo));

  task automatic chk(int k, real d, real c, real s, real gc, real gs);
    real ec, es, bc, bs, g;
    if (first) begin c = 0.0; s = 0.0; end
    if (k == 0) begin
      g  = 2.0 / ($sqrt(2.0) * N);
      ec = c + d * g;
      es = -(s + d * g);
    end else begin
      bc = c + d * 2.0 / N * $cos(PI * k / (2.0 * N));
      bs = s + d * 2.0 / N * $sin(PI * k / (2.0 * N));
      ec = bc * $cos(PI * k / N) + bs * $sin(PI * k / N);
      es = -bc * $sin(PI * k / N) + bs * $cos(PI * k / N);
    end
    checks += 2;
    if ((gc - ec) > TOL || (ec - gc) > TOL || (gs - es) > TOL || (es - gs) > TOL) begin
      failures++;
      if (failures < 10) $display("MISMATCH k=%0d got %f %f exp %f %f", k, gc, gs, ec, es);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      first = ($urandom_range(7) == 0);
      for (int m = 0; m < M; m++) begin
        de[m] = W'(int'($urandom_range(1400)) - 700);
        dd[m] = W'(int'($urandom_range(1400)) - 700);
        ce[m] = W'(int'($urandom_range(1000)) - 500);
        se[m] = W'(int'($urandom_range(1000)) - 500);
        co[m] = W'(int'($urandom_range(1000)) - 500);
        so[m] = W'(int'($urandom_range(1000)) - 500);
      end
      #1;
      for (int m = 0; m < M; m++) begin
        chk(2 * m, real'(de[m]), real'(ce[m]), real'(se[m]), real'(ceo[m]), real'(seo[m]));
        chk(2 * m + 1, real'(dd[m]), real'(co[m]), real'(so[m]), real'(coo[m]), real'(soo[m]));
      end
    end
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
