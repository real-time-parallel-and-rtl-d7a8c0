// lai_module: one lattice module of lattice array I (LAI), computing one
// coefficient l of the 1-D DCT of a serially arriving row, time-recursively.
//
// Each enabled cycle a new sample x enters. The module feeds its own previous
// outputs back through a one-cycle delay and applies the same butterfly as an
// LAII module (laii_module, frequency index L) to (-1)^L * x. After N samples of
// a row the register X_c holds
//   delta(l) = (2/N) C(l) sum_n x(n) cos(pi (2n+1) l / 2N)
// and X_s the matching sine term (for L = 0: X_s(N)). When clr is high the fed
// back state is replaced by zero, so a new row starts from an empty window;
// the arrays clear every N cycles.
//
// Own choices: the sliding-window path (an N-sample delay line supplying the
// sample that leaves the window) is not built, because every array here is
// cleared each row and that sample is then always zero; the factor (-1)^L on the
// new sample comes from the recursion; for L = 0 the 2/(sqrt(2) N) gain is
// applied to the input rather than the output so the accumulator stays in range.
//
// Timing: one sample per enabled cycle; result valid in xc/xs one cycle after
// the last sample of a row.
module lai_module #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = dct_pkg::DEF_W,
  parameter int ROM_W = W,
  parameter int L     = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                clr,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] xc,
  output logic signed [W-1:0] xs
);
  logic signed [W-1:0] xin, c_fb, s_fb, c_nx, s_nx;

  assign xin  = (L % 2 == 1) ? -x : x;
  assign c_fb = clr ? '0 : xc;
  assign s_fb = clr ? '0 : xs;

  laii_module #(.N(N), .W(W), .ROM_W(ROM_W), .K(L)) u_lat (
    .delta(xin), .xc_in(c_fb), .xs_in(s_fb), .xc_out(c_nx), .xs_out(s_nx));

  always_ff @(posedge clk) begin
    if (rst) begin
      xc <= '0;
      xs <= '0;
    end else if (en) begin
      xc <= c_nx;
      xs <= s_nx;
    end
  end

endmodule
