// csm1: circular shift matrix I, (N+1) x N shift registers chained row after
// row (a snake). A new pixel enters every enabled cycle. Two taps are read:
// the end of the first row, which is the pixel of the newest complete row
// x(t+N, n), and the end of the last row, the same column of the row N rows
// earlier, x(t, n). The prematrix architecture forms their sum and difference
// with two adders.
//
// Interface and timing: x_new = input delayed N enabled cycles, x_old = input
// delayed (N+1)*N enabled cycles, both registered. Reset clears the matrix (an
// all-zero history). Follows the document; tap naming is this design's own.
module csm1 #(
  parameter int N = dct_pkg::DEF_N,
  parameter int W = dct_pkg::DEF_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] x_new,
  output logic signed [W-1:0] x_old
);
  localparam int D = (N + 1) * N;
  logic signed [W-1:0] s [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < D; i++) s[i] <= '0;
    end else if (en) begin
      s[0] <= x;
      for (int i = 1; i < D; i++) s[i] <= s[i-1];
    end
  end

  assign x_new = s[N-1];
  assign x_old = s[D-1];
endmodule
