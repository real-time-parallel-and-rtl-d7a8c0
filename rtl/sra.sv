// sra: shift register array for one half (even or odd k) of lattice array II.
// It holds M = N/2 pairs of delay lines, each N registers long, one pair per
// LAII module: the module's new X_c(k,l) and X_sc(k,l) enter at one end and
// come out N enabled cycles later, exactly when the same (k,l) is next
// updated. Row k of the array therefore holds the N coefficients X_c(k,.) and
// X_sc(k,.), skewed so that row k presents l = k, k+1, ... in turn.
//
// Interface and timing: xc_q/xs_q are the oldest entries (registered); reset
// clears everything, which is the all-zero starting frame.
module sra #(
  parameter int N = dct_pkg::DEF_N,
  parameter int W = dct_pkg::DEF_W,
  parameter int M = N / 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] xc_d [M],
  input  logic signed [W-1:0] xs_d [M],
  output logic signed [W-1:0] xc_q [M],
  output logic signed [W-1:0] xs_q [M]
);
  logic signed [W-1:0] rc [M][N];
  logic signed [W-1:0] rs [M][N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < M; m++)
        for (int i = 0; i < N; i++) begin
          rc[m][i] <= '0;
          rs[m][i] <= '0;
        end
    end else if (en) begin
      for (int m = 0; m < M; m++) begin
        rc[m][0] <= xc_d[m];
        rs[m][0] <= xs_d[m];
        for (int i = 1; i < N; i++) begin
          rc[m][i] <= rc[m][i-1];
          rs[m][i] <= rs[m][i-1];
        end
      end
    end
  end

  always_comb begin
    for (int m = 0; m < M; m++) begin
      xc_q[m] = rc[m][N-1];
      xs_q[m] = rs[m][N-1];
    end
  end
endmodule
