// laii_module: one lattice module of lattice array II (LAII), the butterfly
// that advances a 2-D transform coefficient pair by one frame:
//
//   Xbar_c  = X_c  + delta * (2/N) cos(pi k/2N)
//   Xbar_sc = X_sc + delta * (2/N) sin(pi k/2N)
//   X_c'    =  Xbar_c cos(pi k/N) + Xbar_sc sin(pi k/N)
//   X_sc'   = -Xbar_c sin(pi k/N) + Xbar_sc cos(pi k/N)
//
// for k = 1..N-1. Module K = 0 is the degenerate pair that needs no multiplier
// in the rotation: it updates X_c(0,l) by delta * 2/(sqrt(2) N) and, in the same
// module, the auxiliary DSCT term X_sc(N,l), which by the recursion flips sign
// every frame: X_sc' = -(X_sc + delta * 2/(sqrt(2) N)).
//
// All constant multiplications are distributed-arithmetic ROM multipliers
// (da_cmul), three per module: one for the input pair, one per rotation branch.
// The structure and the update equations follow the document; merging k = 0 and
// k = N into one module, and the sign flip of X_sc(N,l) (which the recursion
// requires), are this design's reading.
//
// The module is purely combinational; the frame delay lives outside (the shift
// register array for LAII, a register for LAI in lai_module).
module laii_module #(
  parameter int N     = dct_pkg::DEF_N,
  parameter int W     = dct_pkg::DEF_W,
  parameter int ROM_W = W,
  parameter int K     = 1
) (
  input  logic signed [W-1:0] delta,
  input  logic signed [W-1:0] xc_in,
  input  logic signed [W-1:0] xs_in,
  output logic signed [W-1:0] xc_out,
  output logic signed [W-1:0] xs_out
);
  import dct_pkg::*;

  if (K == 0) begin : g_dc
    logic signed [W-1:0] d0, d_unused;
    da_cmul #(.W(W), .ROM_W(ROM_W), .C0(dc_gain(N)), .C1(0.0)) u_in (
      .x(delta), .p0(d0), .p1(d_unused));
    always_comb begin
      xc_out = xc_in + d0;
      xs_out = -(xs_in + d0);
    end
  end else begin : g_rot
    localparam real G = 2.0 / real'(N);
    logic signed [W-1:0] a, b, u, v, uc, us, vs, vc;
    da_cmul #(.W(W), .ROM_W(ROM_W), .C0(G * gamma_c(1, K, N)), .C1(G * gamma_s(1, K, N)))
      u_in (.x(delta), .p0(a), .p1(b));
    assign u = xc_in + a;
    assign v = xs_in + b;
    da_cmul #(.W(W), .ROM_W(ROM_W), .C0(gamma_c(2, K, N)), .C1(-gamma_s(2, K, N)))
      u_rc (.x(u), .p0(uc), .p1(us));
    da_cmul #(.W(W), .ROM_W(ROM_W), .C0(gamma_s(2, K, N)), .C1(gamma_c(2, K, N)))
      u_rs (.x(v), .p0(vs), .p1(vc));
    assign xc_out = uc + vs;
    assign xs_out = us + vc;
  end

endmodule
