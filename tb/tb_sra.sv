// tb_sra: checks that every delay line of the shift register array returns
// its input exactly N enabled cycles later (zeros right after reset) and holds
// while en is low.
module tb_sra;
  localparam int N = 8, W = 12, M = N / 2, CYC = 500;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0] xc_d [M], xs_d [M], xc_q [M], xs_q [M];
  logic signed [W-1:0] hc [CYC][M], hs [CYC][M];
  int checks = 0, failures = 0, nen = 0;

  sra #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int m = 0; m < M; m++) begin xc_d[m] = '0; xs_d[m] = '0; end
    @(posedge clk); rst <= 0;
    for (int c = 0; c < CYC; c++) begin
      @(negedge clk);
      // outputs now reflect nen enabled edges
      for (int m = 0; m < M; m++) begin
        logic signed [W-1:0] ec, es;
        ec = (nen >= N) ? hc[nen - N][m] : '0;
        es = (nen >= N) ? hs[nen - N][m] : '0;
        checks += 2;
        if (xc_q[m] !== ec || xs_q[m] !== es) begin
          failures++;
          if (failures < 10) $display("MISMATCH c=%0d m=%0d", c, m);
        end
      end
      en <= ($urandom_range(3) != 0);
      for (int m = 0; m < M; m++) begin
        xc_d[m] <= W'($urandom);
        xs_d[m] <= W'($urandom);
      end
      @(posedge clk);
      #1;
      if (en) begin
        for (int m = 0; m < M; m++) begin hc[nen][m] = xc_d[m]; hs[nen][m] = xs_d[m]; end
        nen++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYC * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
