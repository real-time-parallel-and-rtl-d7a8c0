// tb_scan_proc: checks the scanning processor at a reduced line width
// (10 channels: 8 luminance, 2 colour difference, so 2 channels per unit).
// Three bands of a raster frame are written at one pixel per cycle (with a few
// idle cycles); for every unit the received pixel stream must be its channels
// in order (luminance channel c to unit c mod 4, colour-difference channels to
// unit 4), each N x N block row by row. Also checks that exactly one unit is
// served per reading cycle, that both buffer halves are used and that a
// continuous input never overflows.
module tb_scan_proc;
  localparam int N = 8, CH = 10, YCH = 8, NY = 4, NDCT = 5, PIX_W = 8, BANDS = 3;
  localparam int LINE_W = CH * N, CH_PER = YCH / NY;
  logic clk = 0, rst = 1, din_valid = 0;
  logic signed [PIX_W-1:0] din = 0, dout;
  logic [NDCT-1:0] dct_en;
  logic overflow;
  int checks = 0, failures = 0, got [NDCT], bank_switches = 0, idle = 0;

  scan_proc #(.N(N), .CHANNELS(CH), .Y_CHANNELS(YCH), .NY(NY), .NDCT(NDCT), .PIX_W(PIX_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic signed [PIX_W-1:0] pix(int line, int col);
    return PIX_W'(line * 37 + col * 11 + (line * col) / 3);
  endfunction

  // expected pixel number i of unit p's stream
  function automatic logic signed [PIX_W-1:0] expect_pix(int p, int i);
    int blkn, band, b, rr, cc, ch;
    blkn = i / (N * N);
    rr   = (i % (N * N)) / N;
    cc   = i % N;
    band = blkn / CH_PER;
    b    = blkn % CH_PER;
    ch   = (p < NY) ? p + NY * b : YCH + b;
    return pix(band * N + rr, ch * N + cc);
  endfunction

  logic rb_q = 0;
  always @(posedge clk) begin
    if (!rst) begin
      int n;
      n = 0;
      for (int p = 0; p < NDCT; p++) if (dct_en[p]) begin
        n++;
        checks++;
        if (dout !== expect_pix(p, got[p])) begin
          failures++;
          if (failures < 10) $display("MISMATCH unit %0d pixel %0d got %0d exp %0d", p, got[p], dout, expect_pix(p, got[p]));
        end
        got[p]++;
      end
      if (n > 1) failures++;
      if (dut.rbank != rb_q) bank_switches++;
      rb_q <= dut.rbank;
    end
  end

  initial begin
    for (int p = 0; p < NDCT; p++) got[p] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int line = 0; line < BANDS * N; line++)
      for (int col = 0; col < LINE_W; col++) begin
        if (line >= 2 * N && $urandom_range(9) == 0) begin
          din_valid <= 0; idle++;
          @(posedge clk);
        end
        din_valid <= 1;
        din <= pix(line, col);
        @(posedge clk);
      end
    din_valid <= 0;
    repeat (N * LINE_W + 20) @(posedge clk);
    for (int p = 0; p < NDCT; p++) begin
      checks++;
      if (got[p] != BANDS * CH_PER * N * N) begin
        failures++;
        $display("unit %0d received %0d pixels", p, got[p]);
      end
    end
    checks += 2;
    if (overflow) failures++;
    if (bank_switches < 2) failures++;
    $display("bank switches %0d", bank_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (BANDS * N * LINE_W * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
