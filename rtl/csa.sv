// csa: circular shift array, N registers in a ring. With load high the ring
// takes a whole N-vector in parallel (once per row, N cycles apart); on every
// other enabled cycle it rotates by one place, q[i] <= q[(i+1) mod N]. All N
// registers are visible, so a lattice module tied to position k sees element
// (j + k) mod N in the j-th cycle after a load: each element passes every
// module once per N cycles.
//
// Interface and timing: registered outputs q[], updated on enabled edges.
module csa #(
  parameter int N = dct_pkg::DEF_N,
  parameter int W = dct_pkg::DEF_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] din [N],
  output logic signed [W-1:0] q   [N]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < N; i++) q[i] <= load ? din[i] : q[(i + 1) % N];
    end
  end
endmodule
