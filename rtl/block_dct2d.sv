// block_dct2d: block 2-D DCT (and its companion 2-D DSCT) of successive N x N
// blocks arriving one pixel per cycle in row order, built from two 1-D lattice
// arrays and no transposition memory.
//
// How it works. The frame-recursive view treats a block as the last of a
// sequence of frames that starts from an all-zero frame. Each new row m adds
//   delta(k,l) = (-1)^k * (1-D DCT of row m)(l)
// to every 2-D coefficient through an LAII butterfly (laii_module), and rotates
// each (X_c, X_sc) pair by pi k/N. After the N-th row the pairs hold the block's
//   X_c(k,l)  = (4/N^2) C(k) C(l) sum x(m,n) cos(pi(2m+1)k/2N) cos(pi(2n+1)l/2N)
// and the DSCT X_sc(k,l) (sine in m) for k = 1..N.
//   * LAI (lai) computes the 1-D DCT of the row in N cycles, cleared every row.
//   * Two circular shift arrays (csa) take that vector when the row ends; the
//     odd one's outputs are negated, giving the (-1)^k factor.
//   * LAII even/odd (laii_group, N/2 modules each) update one l per module per
//     cycle; the shift register arrays (sra) hold the N values of l for each k
//     and return them N cycles later. On the first row of a block the fed-back
//     values are taken as zero: that is the block reset every N^2 cycles.
// This organisation follows the document; counters, flags and output
// registering are this design's own.
//
// Interface: x is a signed PIX_W-bit pixel, consumed on every cycle with en
// high (en is a clock enable for the whole pipeline). The first enabled cycle
// after rst carries x(0,0) of the first block; blocks follow back to back.
// Outputs: during the N enabled cycles that follow the block's last row
// (ticks N^2+1 .. N^2+N counted from its first pixel at tick 0, visible one
// clock later) out_valid is high and, for every k at once,
//   xc[k] = X_c(k, l),  xs[k] = X_sc(k, l) (xs[0] carries X_sc(N, l)),
//   with l = (out_l0 + k) mod N  (the skew of the shift register array).
// Words are W-bit two's complement with F fraction bits. Throughput: one
// block per N^2 cycles, N coefficients of each kind per cycle.
module block_dct2d #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = dct_pkg::DEF_W,
  parameter int F     = dct_pkg::DEF_F,
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
    assert (N % 2 == 0) else $error("block_dct2d: N must be even");
    assert (PIX_W + F < W) else $error("block_dct2d: pixel does not fit the word");
  end

  // position of the incoming pixel inside its block
  logic [LW-1:0] col, row;
  logic          primed;     // at least one row has been completed since reset

  always_ff @(posedge clk) begin
    if (rst) begin
      col    <= '0;
      row    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      col <= (col == LW'(N - 1)) ? '0 : col + 1'b1;
      if (col == LW'(N - 1)) begin
        row    <= (row == LW'(N - 1)) ? '0 : row + 1'b1;
        primed <= 1'b1;
      end
    end
  end

  // ---- lattice array I: 1-D DCT of the current row
  logic signed [W-1:0] xw;
  logic signed [W-1:0] d1 [N];
  assign xw = W'(x) <<< F;

  lai #(.N(N), .W(W), .ROM_W(ROM_W)) u_lai (
    .clk(clk), .rst(rst), .en(en), .clr(col == '0), .x(xw), .delta(d1));

  // ---- circular shift arrays, loaded when a row has just completed
  logic                load;
  logic signed [W-1:0] qe [N];
  logic signed [W-1:0] qo [N];
  logic                csa_first, csa_last;  // the CSA holds row 0 / row N-1

  assign load = en && (col == '0) && primed;

  csa #(.N(N), .W(W)) u_csa_e (.clk(clk), .rst(rst), .en(en), .load(load), .din(d1), .q(qe));
  csa #(.N(N), .W(W)) u_csa_o (.clk(clk), .rst(rst), .en(en), .load(load), .din(d1), .q(qo));

  always_ff @(posedge clk) begin
    if (rst) begin
      csa_first <= 1'b0;
      csa_last  <= 1'b0;
    end else if (en && col == '0) begin
      // the row that has just finished is row - 1 (mod N)
      csa_first <= primed && (row == LW'(1));
      csa_last  <= primed && (row == '0);
    end
  end

  // ---- lattice array II and shift register arrays
  logic signed [W-1:0] de [M], dod [M];
  logic signed [W-1:0] ce_q [M], se_q [M], co_q [M], so_q [M];
  logic signed [W-1:0] ce_d [M], se_d [M], co_d [M], so_d [M];

  always_comb begin
    for (int m = 0; m < M; m++) begin
      de[m]  = qe[2 * m];
      dod[m] = -qo[2 * m + 1];   // (-1)^k for odd k
    end
  end

  laii_group #(.N(N), .W(W), .ROM_W(ROM_W), .ODD(1'b0)) u_laii_e (
    .first(csa_first), .delta(de), .xc_in(ce_q), .xs_in(se_q), .xc_out(ce_d), .xs_out(se_d));
  laii_group #(.N(N), .W(W), .ROM_W(ROM_W), .ODD(1'b1)) u_laii_o (
    .first(csa_first), .delta(dod), .xc_in(co_q), .xs_in(so_q), .xc_out(co_d), .xs_out(so_d));

  sra #(.N(N), .W(W)) u_sra_e (.clk(clk), .rst(rst), .en(en),
    .xc_d(ce_d), .xs_d(se_d), .xc_q(ce_q), .xs_q(se_q));
  sra #(.N(N), .W(W)) u_sra_o (.clk(clk), .rst(rst), .en(en),
    .xc_d(co_d), .xs_d(so_d), .xc_q(co_q), .xs_q(so_q));

  // ---- output: the last row's update of every coefficient
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_l0    <= '0;
      for (int k = 0; k < N; k++) begin
        xc[k] <= '0;
        xs[k] <= '0;
      end
    end else begin
      out_valid <= en && csa_last;
      if (en && csa_last) begin
        out_l0 <= (col == '0) ? LW'(N - 1) : col - 1'b1;  // l seen by module k = 0
        for (int m = 0; m < M; m++) begin
          xc[2 * m]     <= ce_d[m];
          xc[2 * m + 1] <= co_d[m];
          xs[2 * m]     <= se_d[m];  // index 0: X_sc(N, l)
          xs[2 * m + 1] <= so_d[m];
        end
      end
    end
  end

endmodule
