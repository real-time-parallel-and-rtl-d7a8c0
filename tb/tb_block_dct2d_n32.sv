// tb_block_dct2d_n32: the block 2-D DCT at transform size N = 32, one of the
// larger sizes the lattice structure is meant to scale to (the multiplier
// count grows as 8N). Same method as the 8x8 test: NB random 32x32 blocks
// (one all +127 and one all -128) streamed back to back with random
// clock-enable gaps, every X_c and X_sc output compared with the defining
// double sums in floating point, using the output skew
// l = (out_l0 + k) mod N. Also checks that each block gives N output cycles
// and that the first output follows the first pixel by N^2+1 enabled cycles
// (seen one clock later). Word length W = 20 with F = 8 fraction bits is
// this test's own choice; the error limit is TOL pixel units.
module tb_block_dct2d_n32;
  localparam int  N = 32, W = 20, F = 8, PIX_W = 8, NB = 4;
  localparam real TOL = 3.0;   // allowed error, in pixel units
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, en = 0;
  logic signed [PIX_W-1:0] x = 0;
  logic out_valid;
  logic [$clog2(N)-1:0] out_l0;
  logic signed [W-1:0] xc [N], xs [N];

  block_dct2d #(.N(N), .W(W), .F(F)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pix [NB+1][N][N];
  int tick = 0;             // enabled cycles since first pixel
  int first_out_tick = -1;
  int outs_in_block = 0, blk_out = 0;
  real maxerr = 0.0;

  function automatic real cc(int k);
    return (k == 0 || k == N) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic real ref_c(int b, int k, int l);
    real s = 0.0;
    for (int m = 0; m < N; m++)
      for (int n = 0; n < N; n++)
        s += pix[b][m][n] * $cos(PI * (2*m+1) * k / (2.0*N)) * $cos(PI * (2*n+1) * l / (2.0*N));
    return 4.0 / (N*N) * cc(k) * cc(l) * s;
  endfunction

  function automatic real ref_s(int b, int k, int l);
    real s = 0.0;
    for (int m = 0; m < N; m++)
      for (int n = 0; n < N; n++)
        s += pix[b][m][n] * $sin(PI * (2*m+1) * k / (2.0*N)) * $cos(PI * (2*n+1) * l / (2.0*N));
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

  // enabled edges since reset
  always @(posedge clk) if (!rst && en) tick <= tick + 1;

  // output checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (first_out_tick < 0) first_out_tick = tick;
      for (int k = 0; k < N; k++) begin
        int l;
        l = (out_l0 + k) % N;
        cmp(real'(xc[k]) / (1 << F), ref_c(blk_out, k, l), $sformatf("blk%0d Xc(%0d,%0d)", blk_out, k, l));
        cmp(real'(xs[k]) / (1 << F), ref_s(blk_out, (k == 0) ? N : k, l), $sformatf("blk%0d Xsc(%0d,%0d)", blk_out, k, l));
      end
      outs_in_block++;
      if (outs_in_block == N) begin
        outs_in_block = 0;
        blk_out++;
      end
    end
  end

  initial begin
    for (int b = 0; b <= NB; b++)
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++)
          pix[b][m][n] = (b == 1) ? 127 : (b == 2) ? -128 : $signed($urandom_range(255)) - 128;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b <= NB; b++)
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++) begin
          // random enable gaps after the first block
          if (b > 0) while ($urandom_range(3) == 0) begin
            en <= 0;
            @(posedge clk);
          end
          en <= 1;
          x  <= PIX_W'(pix[b][m][n]);
          @(posedge clk);
        end
    en <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (blk_out != NB) begin
      failures++;
      $display("expected %0d output blocks, got %0d", NB, blk_out);
    end
    // pixel x(0,0) is taken on enabled edge 1; the first output is registered
    // on enabled edge N*N+2 (tick N*N+1) and seen at the next clock edge
    checks++;
    if (first_out_tick != N*N + 2) begin
      failures++;
      $display("latency: first output seen after %0d ticks, expected %0d", first_out_tick, N*N + 2);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
