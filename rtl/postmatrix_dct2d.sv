// postmatrix_dct2d: moving-frame 2-D DCT (and 2-D DSCT) with the postmatrix
// method. Pixels arrive one per cycle, row by row, rows N pixels wide and
// unbounded in number; after every row the design delivers the transform of
// the N x N frame made of the latest N rows, i.e. a new frame every N cycles.
//
// How it works. The change from frame t to frame t+1 is driven by
//   delta(k,l,t) = (-1)^k X'(t+N, l) - X'(t, l)
// where X'(m, .) is the 1-D DCT of row m. So each row is transformed once by
// lattice array I (lai); its vector is pushed into circular shift matrix II
// (csm2), which keeps the last N+1 row transforms. Two vector adders form
// X'(t+N) - X'(t) for even k and -X'(t+N) - X'(t) for odd k, which go to the two
// circular shift arrays (csa), and from there to LAII even/odd (laii_group) and
// the shift register arrays (sra) exactly as in block_dct2d, except that the
// state is never cleared. Before the first N rows the missing rows count as
// zero. Structure per the document; the control is this design's own.
//
// Interface: x signed PIX_W-bit pixel per cycle with en high (clock enable).
// The first enabled cycle after rst carries x(0,0). For the frame whose newest
// row is m, out_valid is high for N enabled cycles starting with the one after
// the edge that ends tick (m+1)N+2, and xc[k] = X_c(k,l), xs[k] = X_sc(k,l)
// (xs[0]: X_sc(N,l)) with l = (out_l0 + k) mod N. The frame made of rows
// m-N+1..m is  X_c(k,l) = (4/N^2) C(k) C(l) sum x(m',n) cos(pi(2(m'-m+N-1)+1)k/2N)
// cos(pi(2n+1)l/2N). Words have F fraction bits. Round-off is never cleared,
// so errors of the fixed-point rotations accumulate slowly with time.
module postmatrix_dct2d #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = 20,
  parameter int F     = 8,
  parameter int PIX_W = dct_pkg::DEF_PIX_W,
  parameter int ROM_W = W,
  localparam int LW   = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [PIX_W-1:0] x,
  output logic                    out_valid,
  output logic [LW-1:0]           out_l0,
  output logic signed [W-1:0]     xc [N],
  output logic signed [W-1:0]     xs [N]
);
  localparam int M = N / 2;

  initial begin
    assert (N % 2 == 0 && N >= 4) else $error("postmatrix_dct2d: N must be even and >= 4");
  end

  logic [LW-1:0] col;
  logic          primed, c2_loaded, csa_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      col       <= '0;
      primed    <= 1'b0;
      c2_loaded <= 1'b0;
      csa_valid <= 1'b0;
    end else if (en) begin
      col <= (col == LW'(N - 1)) ? '0 : col + 1'b1;
      if (col == LW'(N - 1)) primed <= 1'b1;
      if (col == '0 && primed) c2_loaded <= 1'b1;
      if (col == LW'(1) && c2_loaded) csa_valid <= 1'b1;
    end
  end

  // ---- LAI: 1-D DCT of each row
  logic signed [W-1:0] xw;
  logic signed [W-1:0] d1 [N];
  assign xw = W'(x) <<< F;

  lai #(.N(N), .W(W), .ROM_W(ROM_W)) u_lai (
    .clk(clk), .rst(rst), .en(en), .clr(col == '0), .x(xw), .delta(d1));

  // ---- CSM II: the last N+1 row transforms
  logic signed [W-1:0] rnew [N], rold [N];
  csm2 #(.N(N), .W(W)) u_csm2 (
    .clk(clk), .rst(rst), .en(en), .load(en && col == '0 && primed),
    .din(d1), .newest(rnew), .oldest(rold));

  // ---- the two adders: delta for even and for odd k
  logic signed [W-1:0] dev [N], dod [N];
  always_comb begin
    for (int l = 0; l < N; l++) begin
      dev[l] =  rnew[l] - rold[l];
      dod[l] = -rnew[l] - rold[l];
    end
  end

  logic                load;
  logic signed [W-1:0] qe [N], qo [N];
  assign load = en && col == LW'(1) && c2_loaded;

  csa #(.N(N), .W(W)) u_csa_e (.clk(clk), .rst(rst), .en(en), .load(load), .din(dev), .q(qe));
  csa #(.N(N), .W(W)) u_csa_o (.clk(clk), .rst(rst), .en(en), .load(load), .din(dod), .q(qo));

  // ---- LAII and SRA
  logic signed [W-1:0] de [M], dd [M];
  logic signed [W-1:0] ce_q [M], se_q [M], co_q [M], so_q [M];
  logic signed [W-1:0] ce_d [M], se_d [M], co_d [M], so_d [M];

  always_comb begin
    for (int m = 0; m < M; m++) begin
      de[m] = qe[2 * m];
      dd[m] = qo[2 * m + 1];
    end
  end

  laii_group #(.N(N), .W(W), .ROM_W(ROM_W), .ODD(1'b0)) u_laii_e (
    .first(1'b0), .delta(de), .xc_in(ce_q), .xs_in(se_q), .xc_out(ce_d), .xs_out(se_d));
  laii_group #(.N(N), .W(W), .ROM_W(ROM_W), .ODD(1'b1)) u_laii_o (
    .first(1'b0), .delta(dd), .xc_in(co_q), .xs_in(so_q), .xc_out(co_d), .xs_out(so_d));

  sra #(.N(N), .W(W)) u_sra_e (.clk(clk), .rst(rst), .en(en),
    .xc_d(ce_d), .xs_d(se_d), .xc_q(ce_q), .xs_q(se_q));
  sra #(.N(N), .W(W)) u_sra_o (.clk(clk), .rst(rst), .en(en),
    .xc_d(co_d), .xs_d(so_d), .xc_q(co_q), .xs_q(so_q));

  // ---- output: every update is the transform of a frame
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_l0    <= '0;
      for (int k = 0; k < N; k++) begin
        xc[k] <= '0;
        xs[k] <= '0;
      end
    end else begin
      out_valid <= en && csa_valid;
      if (en && csa_valid) begin
        out_l0 <= (col >= LW'(2)) ? col - LW'(2) : col + LW'(N - 2);
        for (int m = 0; m < M; m++) begin
          xc[2 * m]     <= ce_d[m];
          xc[2 * m + 1] <= co_d[m];
          xs[2 * m]     <= se_d[m];
          xs[2 * m + 1] <= so_d[m];
        end
      end
    end
  end

endmodule
