// lai: lattice array I, a bank of N independent lattice modules (lai_module,
// l = 0..N-1) that all see the same serial input and together produce the
// 1-D DCT of each N-sample row,
//   delta(l) = (2/N) C(l) sum_{n=0}^{N-1} x(n) cos(pi (2n+1) l / 2N),
// as N parallel words. There is no global connection between the modules.
//
// Interface: one sample x per cycle with en high; clr must be high with the
// first sample of each row (n = 0). The vector delta[] is valid in the cycle
// after the last sample of a row, i.e. during the cycle that carries the next
// row's first sample, and is overwritten on the following enabled edge.
module lai #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = dct_pkg::DEF_W,
  parameter int ROM_W = W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                clr,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] delta [N]
);
  for (genvar l = 0; l < N; l++) begin : g_mod
    logic signed [W-1:0] xs_unused;
    lai_module #(.N(N), .W(W), .ROM_W(ROM_W), .L(l)) u_m (
      .clk(clk), .rst(rst), .en(en), .clr(clr), .x(x),
      .xc(delta[l]), .xs(xs_unused));
  end
endmodule
