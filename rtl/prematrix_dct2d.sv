// prematrix_dct2d: moving-frame 2-D DCT (and 2-D DSCT) with the prematrix
// method. Same task and interface as postmatrix_dct2d: pixels arrive one per
// cycle row by row, and after every row the transform of the frame of the last
// N rows is delivered, a new frame every N cycles.
//
// How it works. Circular shift matrix I (csm1) delays the pixel stream so that
// x(t+N, n) and x(t, n), the same column of the newest row and of the row that
// leaves the frame, come out together. Two adders form x(t+N,n) - x(t,n) (for
// even k) and -x(t+N,n) - x(t,n) (for odd k); each stream goes through its own
// lattice array I (lai), so the two 1-D DCTs are directly delta(k,l,t) for even
// and odd k. Circular shift arrays, LAII even/odd and shift register arrays
// then work as in the postmatrix design. This needs three 1-D lattice arrays
// (two LAI, one LAII) where the postmatrix method needs two. Structure per the
// document; control is this design's own.
//
// Interface and timing: as postmatrix_dct2d, except that the outputs of the
// frame whose newest row is m start after the edge that ends tick (m+2)N+1
// (counting the first pixel as tick 0), because CSM I delays the rows by one
// row before the LAIs see them; l = (out_l0 + k) mod N.
module prematrix_dct2d #(
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
    assert (N % 2 == 0) else $error("prematrix_dct2d: N must be even");
    assert (PIX_W + F + 1 < W) else $error("prematrix_dct2d: pixel sums do not fit the word");
  end

  logic [LW-1:0] col;
  logic [1:0]    rows_done;   // saturating count of completed input rows
  logic          csa_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      col       <= '0;
      rows_done <= '0;
      csa_valid <= 1'b0;
    end else if (en) begin
      col <= (col == LW'(N - 1)) ? '0 : col + 1'b1;
      if (col == LW'(N - 1) && rows_done != 2'd2) rows_done <= rows_done + 1'b1;
      if (col == '0 && rows_done == 2'd2) csa_valid <= 1'b1;
    end
  end

  // ---- CSM I and the two adders
  logic signed [W-1:0] xw, xn, xo, ae, ao;
  assign xw = W'(x) <<< F;

  csm1 #(.N(N), .W(W)) u_csm1 (.clk(clk), .rst(rst), .en(en), .x(xw), .x_new(xn), .x_old(xo));

  assign ae =  xn - xo;
  assign ao = -xn - xo;

  // ---- two LAIs: delta for even and for odd k
  logic signed [W-1:0] d_e [N], d_o [N];
  lai #(.N(N), .W(W), .ROM_W(ROM_W)) u_lai_e (
    .clk(clk), .rst(rst), .en(en), .clr(col == '0), .x(ae), .delta(d_e));
  lai #(.N(N), .W(W), .ROM_W(ROM_W)) u_lai_o (
    .clk(clk), .rst(rst), .en(en), .clr(col == '0), .x(ao), .delta(d_o));

  logic                load;
  logic signed [W-1:0] qe [N], qo [N];
  assign load = en && col == '0 && rows_done == 2'd2;

  csa #(.N(N), .W(W)) u_csa_e (.clk(clk), .rst(rst), .en(en), .load(load), .din(d_e), .q(qe));
  csa #(.N(N), .W(W)) u_csa_o (.clk(clk), .rst(rst), .en(en), .load(load), .din(d_o), .q(qo));

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
        out_l0 <= (col == '0) ? LW'(N - 1) : col - 1'b1;
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
