// dct_out_mux: output multiplexer of the parallel HDTV DCT encoder. The NDCT
// transform units are served in different cycles of the scanning processor's
// round robin, so at most one of them presents a coefficient vector in any
// cycle; the multiplexer forwards that vector, its column index out_l0 and the
// number of the unit it came from (out_src) onto one output bus.
//
// The document names the multiplexer; its time-division form follows from the
// round-robin scan and is this design's own. An assertion checks that no two
// units are valid in the same cycle. Timing: one register stage.
module dct_out_mux #(
  parameter int NDCT = 5,
  parameter int N    = 8,
  parameter int W    = 12,
  localparam int LW  = $clog2(N),
  localparam int SW  = $clog2(NDCT)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NDCT-1:0]     in_valid,
  input  logic [LW-1:0]       in_l0 [NDCT],
  input  logic signed [W-1:0] in_xc [NDCT][N],
  output logic                out_valid,
  output logic [SW-1:0]       out_src,
  output logic [LW-1:0]       out_l0,
  output logic signed [W-1:0] out_xc [N]
);
  logic [SW-1:0] sel;
  int            nvalid;

  always_comb begin
    sel    = '0;
    nvalid = 0;
    for (int i = 0; i < NDCT; i++)
      if (in_valid[i]) begin
        sel    = SW'(i);
        nvalid = nvalid + 1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_src   <= '0;
      out_l0    <= '0;
      for (int k = 0; k < N; k++) out_xc[k] <= '0;
    end else begin
      out_valid <= nvalid != 0;
      if (nvalid != 0) begin
        out_src <= sel;
        out_l0  <= in_l0[sel];
        for (int k = 0; k < N; k++) out_xc[k] <= in_xc[sel][k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (nvalid <= 1) else $error("dct_out_mux: %0d units valid at once", nvalid);
  end

endmodule
