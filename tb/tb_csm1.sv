// tb_csm1: checks circular shift matrix I: x_new must equal the input of N
// enabled cycles earlier and x_old the input of (N+1)*N enabled cycles
// earlier (zero before that), i.e. the same column of the row N rows older.
module tb_csm1;
  localparam int N = 8, W = 12, CYC = 400;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0] x = 0, x_new, x_old;
  logic signed [W-1:0] h [CYC];
  int checks = 0, failures = 0, nen = 0;

  csm1 #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(posedge clk); rst <= 0;
    for (int c = 0; c < CYC; c++) begin
      @(negedge clk);
      checks += 2;
      if (x_new !== ((nen >= N) ? h[nen - N] : W'(0))) failures++;
      if (x_old !== ((nen >= (N+1)*N) ? h[nen - (N+1)*N] : W'(0))) begin
        failures++;
        if (failures < 10) $display("MISMATCH x_old c=%0d", c);
      end
      en <= ($urandom_range(4) != 0);
      x  <= W'($urandom);
      @(posedge clk);
      #1;
      if (en) begin h[nen] = x; nen++; end
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
