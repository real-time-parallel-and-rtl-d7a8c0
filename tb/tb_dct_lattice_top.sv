// tb_dct_lattice_top: end-to-end test of dct_lattice_top at a reduced line width (10 channels: 8 luminance,
// 2 colour difference; the default has 240) and 24 lines.
// HDTV part: a pseudo-random raster frame of LINES lines plus one band of
// blanking (which pushes the last blocks out) is written one pixel per cycle
// with some idle cycles; every coefficient vector on the output bus is matched
// to its unit's next block (band by band, the unit's channels in order) and
// compared with the 2-D DCT of that block computed in floating point; block
// counts, overflow and the real-time bound are checked.
// Moving-frame parts: the same random row stream goes to the postmatrix and
// the prematrix designs at the same time; after every row all DCT and DSCT
// coefficients of the frame of the latest N rows are compared with floating
// point sums.
// Mechanisms counted (each must occur): band-buffer swaps, output from every
// unit, block resets in the block DCTs, cycles in which a unit is held by its
// clock enable, idle input cycles, moving-frame updates of both designs and
// the start-up frames that still contain missing (zero) rows.
module tb_dct_lattice_top;
  localparam int N = 8, CH = 10, YCH = 8, NY = 4, NDCT = 5, PIX_W = 8, W = 12, F = 2;
  localparam int MW = 20, MF = 8, ROWS = 100;
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

  logic pm_en = 0, pr_en = 0;
  logic signed [PIX_W-1:0] mx = 0;
  logic pm_out_valid, pr_out_valid;
  logic [2:0] pm_out_l0, pr_out_l0;
  logic signed [MW-1:0] pm_xc [N], pm_xs [N], pr_xc [N], pr_xs [N];

  dct_lattice_top #(.CHANNELS(CH), .Y_CHANNELS(YCH)) dut (
    .clk(clk), .rst(rst),
    .hdtv_din_valid(din_valid), .hdtv_din(din), .hdtv_out_valid(out_valid),
    .hdtv_out_src(out_src), .hdtv_out_l0(out_l0), .hdtv_out_xc(out_xc), .hdtv_overflow(overflow),
    .pm_en(pm_en), .pm_x(mx), .pm_out_valid(pm_out_valid), .pm_out_l0(pm_out_l0), .pm_xc(pm_xc), .pm_xs(pm_xs),
    .pr_en(pr_en), .pr_x(mx), .pr_out_valid(pr_out_valid), .pr_out_l0(pr_out_l0), .pr_xc(pr_xc), .pr_xs(pr_xs));

  // ---- mechanism counters
  int n_swap = 0, n_reset = 0, n_hold = 0, n_pm = 0, n_pr = 0, n_startup = 0;
  bit src_seen [NDCT];
  logic rb_q = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_hdtv.u_scan.rbank != rb_q) n_swap++;
    rb_q <= dut.u_hdtv.u_scan.rbank;
    if (dut.u_hdtv.g_dct[0].u_dct.csa_first && dut.u_hdtv.sen[0]) n_reset++;
    if (dut.u_hdtv.u_scan.ractive && !dut.u_hdtv.sen[1]) n_hold++;
    if (out_valid) src_seen[out_src] = 1'b1;
  end

  always @(posedge clk) if (!rst && out_valid) hdtv_check();

  // ---- moving-frame checking
  int mpix [ROWS + 3][N];
  int mframes [2], mouts [2];
  real mmax = 0.0;

  function automatic real mref(int m, int k, int l, bit sine);
    real s = 0.0;
    for (int i = 0; i < N; i++) begin
      int r = m - N + 1 + i;
      if (r >= 0)
        for (int n = 0; n < N; n++)
          s += mpix[r][n] * (sine ? $sin(PI * (2*i+1) * k / (2.0*N)) : cosT[k][i]) * cosT[l][n];
    end
    return 4.0 / (N * N) * ((k == 0 || k == N) ? 1.0 / $sqrt(2.0) : 1.0) * cc(l) * s;
  endfunction

  task automatic mcheck(int d, logic [2:0] l0, logic signed [MW-1:0] xc [N], logic signed [MW-1:0] xs [N]);
    int l;
    real e1, e2;
    if (mframes[d] >= ROWS) return;
    if (mframes[d] < N - 1) n_startup++;
    for (int k = 0; k < N; k++) begin
      l = (int'(l0) + k) % N;
      e1 = real'(xc[k]) / (1 << MF) - mref(mframes[d], k, l, 1'b0);
      e2 = real'(xs[k]) / (1 << MF) - mref(mframes[d], (k == 0) ? N : k, l, 1'b1);
      if (e1 < 0) e1 = -e1;
      if (e2 < 0) e2 = -e2;
      if (e1 > mmax) mmax = e1;
      if (e2 > mmax) mmax = e2;
      checks += 2;
      if (e1 > 1.5 || e2 > 1.5) begin
        failures++;
        if (failures < 10) $display("MISMATCH %s frame %0d k=%0d l=%0d", d ? "prematrix" : "postmatrix", mframes[d], k, l);
      end
    end
    mouts[d]++;
    if (mouts[d] == N) begin
      mouts[d] = 0;
      mframes[d]++;
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (pm_out_valid) begin n_pm++; mcheck(0, pm_out_l0, pm_xc, pm_xs); end
    if (pr_out_valid) begin n_pr++; mcheck(1, pr_out_l0, pr_xc, pr_xs); end
  end

  task automatic drive_rows();
    for (int r = 0; r < ROWS + 3; r++)
      for (int n = 0; n < N; n++) begin
        if ($urandom_range(7) == 0) begin
          pm_en <= 0; pr_en <= 0;
          @(posedge clk);
        end
        pm_en <= 1; pr_en <= 1;
        mx <= PIX_W'(mpix[r][n]);
        @(posedge clk);
      end
    pm_en <= 0; pr_en <= 0;
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("mechanism %s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", what);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS + 3; r++)
      for (int n = 0; n < N; n++) mpix[r][n] = int'($urandom_range(255)) - 128;
    for (int d = 0; d < 2; d++) begin mframes[d] = 0; mouts[d] = 0; end
    for (int p = 0; p < NDCT; p++) src_seen[p] = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      drive_frame();
      drive_rows();
    join
    repeat (BAND_T) @(posedge clk);
    hdtv_final();
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (mframes[d] != ROWS) begin
        failures++;
        $display("%s delivered %0d frames", d ? "prematrix" : "postmatrix", mframes[d]);
      end
    end
    $display("moving frames: max abs error %f", mmax);
    count("band buffer swap", n_swap);
    for (int p = 0; p < NDCT; p++) count($sformatf("output from unit %0d", p), int'(src_seen[p]));
    count("block reset", n_reset);
    count("unit held by clock enable", n_hold);
    count("idle input cycle", idle_cycles);
    count("postmatrix frame update", n_pm);
    count("prematrix frame update", n_pr);
    count("start-up frame with missing rows", n_startup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((LINES + 3 * N) * LINE_W * 2 + ROWS * N * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
