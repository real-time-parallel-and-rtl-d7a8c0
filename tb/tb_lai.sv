// tb_lai: self-checking test of lattice array I (and so of lai_module).
// Feeds random rows of N words (clr with the first sample of each row, random
// enable gaps) and checks, in the cycle after each row's last sample, every
// delta(l) against the 1-D DCT (2/N) C(l) sum x(n) cos(pi(2n+1)l/2N) worked
// out in floating point.
module tb_lai;
  localparam int  N = 8, W = 12, F = 2, ROWS = 40;
  localparam real TOL = 2.0;     // in input units (word / 2^F)
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, en = 0, clr = 0;
  logic signed [W-1:0] x = 0;
  logic signed [W-1:0] delta [N];
  int checks = 0, failures = 0;
  int row [N];
  real maxerr = 0.0;

  lai #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int n = 0; n < N; n++) begin
        row[n] = (r == 0) ? 127 : (r == 1) ? -128 : int'($urandom_range(255)) - 128;
        while ($urandom_range(4) == 0) begin
          en <= 0;
          @(posedge clk);
        end
        en  <= 1;
        clr <= (n == 0);
        x   <= W'(row[n] * (1 << F));
        @(posedge clk);
      end
      en <= 0;
      @(posedge clk);
      #1;
      for (int l = 0; l < N; l++) begin
        real s, e;
        s = 0.0;
        for (int n = 0; n < N; n++) s += row[n] * $cos(PI * (2*n+1) * l / (2.0*N));
        s = s * 2.0 / N * ((l == 0) ? 1.0 / $sqrt(2.0) : 1.0);
        e = real'(delta[l]) / (1 << F) - s;
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10) $display("MISMATCH row %0d l=%0d got %f exp %f", r, l, real'(delta[l]) / (1 << F), s);
        end
      end
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
