// laii_group: one half of lattice array II, the N/2 lattice modules for the
// even (ODD = 0: k = 0, 2, .., N-2) or odd (ODD = 1: k = 1, 3, .., N-1)
// frequencies k. Module m (k = 2m + ODD) takes its delta from its own tap of
// the circular shift array and its previous X_c(k,l), X_sc(k,l) from row m of
// the shift register array. When first is high the previous values are
// replaced by zero: that starts a new block from an empty frame.
//
// Purely combinational; module 0 of the even half also produces X_sc(N,l).
module laii_group #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = dct_pkg::DEF_W,
  parameter int ROM_W = W,
  parameter bit ODD   = 1'b0,
  parameter int M     = N / 2
) (
  input  logic                first,
  input  logic signed [W-1:0] delta  [M],
  input  logic signed [W-1:0] xc_in  [M],
  input  logic signed [W-1:0] xs_in  [M],
  output logic signed [W-1:0] xc_out [M],
  output logic signed [W-1:0] xs_out [M]
);
  for (genvar m = 0; m < M; m++) begin : g_mod
    logic signed [W-1:0] c_prev, s_prev;
    assign c_prev = first ? '0 : xc_in[m];
    assign s_prev = first ? '0 : xs_in[m];
    laii_module #(.N(N), .W(W), .ROM_W(ROM_W), .K(2 * m + int'(ODD))) u_m (
      .delta(delta[m]), .xc_in(c_prev), .xs_in(s_prev),
      .xc_out(xc_out[m]), .xs_out(xs_out[m]));
  end
endmodule
