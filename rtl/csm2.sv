// csm2: circular shift matrix II, (N+1) x N shift registers chained row after
// row (a snake) whose first row can be loaded in parallel. Once per row the
// LAI's 1-D DCT vector X'(t+N, .) is loaded into the first row; on every other
// enabled cycle the whole snake moves one place, so after N cycles each row
// has moved down by one. In the cycle after a load, the first row holds
// X'(t+N, .) and the last row X'(t, .), the vector N rows older, both in full.
//
// Interface and timing: load with en stores din[] into the first row (element
// l goes to the position that leaves the row after l+1 shifts); newest[] and
// oldest[] show the first and the last row, registered. Reset clears the
// matrix. Follows the document; the parallel read of whole rows (rather than
// the serial row ends) is this design's choice, so that the circular shift
// arrays can be loaded in parallel as in the other architectures.
module csm2 #(
  parameter int N = dct_pkg::DEF_N,
  parameter int W = dct_pkg::DEF_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] din    [N],
  output logic signed [W-1:0] newest [N],
  output logic signed [W-1:0] oldest [N]
);
  localparam int D = (N + 1) * N;
  logic signed [W-1:0] s [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < D; i++) s[i] <= '0;
    end else if (en) begin
      for (int i = 1; i < D; i++) s[i] <= s[i-1];
      if (load) begin
        for (int l = 0; l < N; l++) s[N-1-l] <= din[l];
      end else begin
        s[0] <= '0;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < N; l++) begin
      newest[l] = s[N-1-l];
      oldest[l] = s[N*N + N-1-l];
    end
  end
endmodule
