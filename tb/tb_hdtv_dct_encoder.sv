// tb_hdtv_dct_encoder: end-to-end test of the parallel HDTV DCT encoder at a
// reduced line width (10 channels of 8 pixels: 8 luminance, 2 colour
// difference; the default has 240) and LINES lines. A pseudo-random raster
// frame plus one band of blanking (which pushes the last blocks out) is
// written one pixel per cycle with some idle cycles. For every coefficient
// vector on the output bus the unit number selects the unit's next block
// (band by band, its channels in order), whose 2-D DCT is computed in
// floating point from the frame and compared coefficient by coefficient.
// Also checks the block count of every unit, that no overflow occurs and that
// the last block of the frame is out within one band time plus a few block
// times after the frame ends (real-time operation).
module tb_hdtv_dct_encoder;
  localparam int N = 8, CH = 10, YCH = 8, NY = 4, NDCT = 5, PIX_W = 8, W = 12, F = 2;
  localparam int LINES = 24;
  localparam int LINE_W = CH * N, CH_PER = YCH / NY, NC = NDCT - NY;
  localparam int BANDS = LINES / N, BAND_T = N * LINE_W;
  localparam real TOL = 3.0;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic din_valid = 0;
  logic signed [PIX_W-1:0] din = 0;
  logic out_valid, overflow;
  logic [2:0] out_src, out_l0;
  logic signed [W-1:0] out_xc [N];
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real cosT [N][N];
  real refb [NDCT][N][N];
  int  oc [NDCT], bc [NDCT];
  int  cyc = 0, frame_end_cyc = -1, last_out_cyc = 0, idle_cycles = 0;
  real maxerr = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic signed [PIX_W-1:0] pix(int line, int col);
    logic [31:0] h;
    if (line >= LINES) return '0;
    h = 32'(line) * 32'd2654435761 ^ 32'(col) * 32'd40503 ^ 32'h9e3779b9;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return PIX_W'(h);
  endfunction

  function automatic real cc(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic make_ref(int p, int b);
    int band, j, ch;
    real t [N][N];
    band = b / CH_PER;
    j    = b % CH_PER;
    ch   = (p < NY) ? p + NY * j : YCH + NC * j + (p - NY);
    for (int m = 0; m < N; m++)
      for (int l = 0; l < N; l++) begin
        t[m][l] = 0.0;
        for (int n = 0; n < N; n++) t[m][l] += pix(band * N + m, ch * N + n) * cosT[l][n];
      end
    for (int k = 0; k < N; k++)
      for (int l = 0; l < N; l++) begin
        real s;
        s = 0.0;
        for (int m = 0; m < N; m++) s += t[m][l] * cosT[k][m];
        refb[p][k][l] = 4.0 / (N * N) * cc(k) * cc(l) * s;
      end
  endtask

  task automatic hdtv_check();
    int p, l;
    real e;
    p = int'(out_src);
    if (bc[p] >= BANDS * CH_PER) return;
    if (oc[p] == 0) make_ref(p, bc[p]);
    for (int k = 0; k < N; k++) begin
      l = (int'(out_l0) + k) % N;
      e = real'(out_xc[k]) / (1 << F) - refb[p][k][l];
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("MISMATCH unit %0d block %0d X(%0d,%0d) got %f exp %f",
                                    p, bc[p], k, l, real'(out_xc[k]) / (1 << F), refb[p][k][l]);
      end
    end
    last_out_cyc = cyc;
    oc[p]++;
    if (oc[p] == N) begin
      oc[p] = 0;
      bc[p]++;
    end
  endtask

  task automatic drive_frame();
    for (int line = 0; line < LINES + N; line++) begin
      for (int col = 0; col < LINE_W; col++) begin
        if (line >= N && line < LINES && $urandom_range(63) == 0) begin
          din_valid <= 0;
          idle_cycles++;
          @(posedge clk);
        end
        din_valid <= 1;
        din <= pix(line, col);
        @(posedge clk);
      end
      if (line == LINES - 1) frame_end_cyc = cyc;
    end
    din_valid <= 0;
  endtask

  task automatic hdtv_final();
    for (int p = 0; p < NDCT; p++) begin
      checks++;
      if (bc[p] != BANDS * CH_PER) begin
        failures++;
        $display("unit %0d delivered %0d blocks, expected %0d", p, bc[p], BANDS * CH_PER);
      end
    end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    checks++;
    if (last_out_cyc - frame_end_cyc > BAND_T + 3 * N * N * NDCT) begin
      failures++;
      $display("last block %0d cycles after the frame, bound %0d", last_out_cyc - frame_end_cyc, BAND_T + 3 * N * N * NDCT);
    end
    begin
      int nb;
      nb = 0;
      for (int p = 0; p < NDCT; p++) nb += bc[p];
      $display("HDTV: %0d blocks checked, max abs error %f", nb, maxerr);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++)
      for (int m = 0; m < N; m++) cosT[k][m] = $cos(PI * (2 * m + 1) * k / (2.0 * N));
    for (int p = 0; p < NDCT; p++) begin oc[p] = 0; bc[p] = 0; end
  end

  hdtv_dct_encoder #(.N(N), .CHANNELS(CH), .Y_CHANNELS(YCH), .NY(NY), .NDCT(NDCT),
                     .PIX_W(PIX_W), .W(W), .F(F)) dut (.*);

  always @(posedge clk) if (!rst && out_valid) hdtv_check();

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    drive_frame();
    repeat (BAND_T) @(posedge clk);
    hdtv_final();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((LINES + 3 * N) * LINE_W * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
