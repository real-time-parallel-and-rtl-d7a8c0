// tb_prematrix_dct2d: self-checking test of the prematrix moving-frame 2-D DCT.
// Streams ROWS random rows of N signed pixels (random clock-enable gaps after
// the first rows), and after every row checks all N x N DCT and DSCT
// coefficients of the frame made of the latest N rows (earlier rows count as
// zero) against the defining double sums computed in floating point. Also
// checks the latency of the first frame, the number of frames delivered, and
// that the frame rate is one frame per N enabled cycles.
module tb_prematrix_dct2d;
  localparam int  N = 8, W = 20, F = 8, PIX_W = 8, ROWS = 120;
  localparam real TOL = 1.0;   // round-off is never cleared in a moving frame
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, en = 0;
  logic signed [PIX_W-1:0] x = 0;
  logic out_valid;
  logic [2:0] out_l0;
  logic signed [W-1:0] xc [N], xs [N];

  prematrix_dct2d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pix [ROWS+3][N];
  int tick = 0, first_out_tick = -1, outs = 0, frames = 0;
  int last_frame_tick = -1, rate_bad = 0;
  real maxerr = 0.0;

  always @(posedge clk) if (!rst && en) tick <= tick + 1;

  function automatic real cc(int k);
    return (k == 0 || k == N) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  // frame whose newest row is m: rows m-N+1 .. m
  function automatic real ref_v(int m, int k, int l, bit sine);
    real s = 0.0;
    for (int i = 0; i < N; i++) begin
      int r = m - N + 1 + i;
      if (r >= 0)
        for (int n = 0; n < N; n++)
          s += pix[r][n] * (sine ? $sin(PI * (2*i+1) * k / (2.0*N)) : $cos(PI * (2*i+1) * k / (2.0*N)))
                         * $cos(PI * (2*n+1) * l / (2.0*N));
    end
    return 4.0 / (N*N) * cc(k) * cc(l) * s;
  endfunction

  task automatic cmp(real got, real exp, string what);
    real e = got - exp;
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > TOL) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s got %f exp %f", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid && frames < ROWS) begin
      int l;
      if (first_out_tick < 0) first_out_tick = tick;
      if (outs == 0) begin
        if (last_frame_tick >= 0 && tick - last_frame_tick != N) rate_bad++;
        last_frame_tick = tick;
      end
      for (int k = 0; k < N; k++) begin
        l = (out_l0 + k) % N;
        cmp(real'(xc[k]) / (1 << F), ref_v(frames, k, l, 1'b0), $sformatf("frame%0d Xc(%0d,%0d)", frames, k, l));
        cmp(real'(xs[k]) / (1 << F), ref_v(frames, (k == 0) ? N : k, l, 1'b1), $sformatf("frame%0d Xsc(%0d,%0d)", frames, k, l));
      end
      outs++;
      if (outs == N) begin
        outs = 0;
        frames++;
      end
    end
  end

  initial begin
    for (int r = 0; r < ROWS + 3; r++)
      for (int n = 0; n < N; n++)
        pix[r][n] = (r < N) ? 127 : (r < 2*N) ? -128 : int'($urandom_range(255)) - 128;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < ROWS + 3; r++)
      for (int n = 0; n < N; n++) begin
        if (r > 3 * N) while ($urandom_range(3) == 0) begin
          en <= 0;
          @(posedge clk);
        end
        en <= 1;
        x  <= PIX_W'(pix[r][n]);
        @(posedge clk);
      end
    en <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (frames != ROWS) begin
      failures++;
      $display("expected %0d frames, got %0d", ROWS, frames);
    end
    checks++;
    if (first_out_tick != 2*N + 2) begin
      failures++;
      $display("latency: first output after %0d ticks, expected %0d", first_out_tick, 2*N + 2);
    end
    checks++;
    if (rate_bad != 0) begin
      failures++;
      $display("%0d frames not N enabled cycles apart", rate_bad);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROWS * N * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
