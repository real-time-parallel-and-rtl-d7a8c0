// hdtv_dct_encoder: the parallel 2-D DCT stage of a DCT-based HDTV source
// coder. A frame of CHANNELS*N pixels per line (luminance channels first, then
// the colour-difference channels) is reordered by the scanning processor into
// N-pixel-wide channels scanned row by row; NY block 2-D DCT units take the
// luminance channels in turn and NDCT-NY units the colour-difference channels,
// and a multiplexer puts their coefficient vectors on one output bus.
//
// Default sizes are those of the document's example: 1080-line frames of
// 240 channels of 8 pixels (192 luminance, 48 colour difference), five 8x8
// units (four for Y, one for the colour-difference signals), 12-bit words.
//
// Interface: din/din_valid raster pixels (signed, level-shifted), one per
// cycle at most. Output: out_valid, out_src (unit number), out_l0 and out_xc[k]
// = X_c(k, (out_l0+k) mod N) of the block that unit is finishing, F fraction
// bits. Each unit delivers its blocks in its own channel order (band by band,
// channel by channel). Results of a block appear while the unit takes the
// second row of its next block, so the last blocks of a stream are pushed out
// by the next band (for example the next frame or one band of blanking).
// Latency from the end of a band to its first coefficients: about one band.
module hdtv_dct_encoder #(
  parameter int N          = 8,
  parameter int CHANNELS   = 240,
  parameter int Y_CHANNELS = 192,
  parameter int NY         = 4,
  parameter int NDCT       = 5,
  parameter int PIX_W      = 8,
  parameter int W          = 12,
  parameter int F          = 2,
  localparam int LW        = $clog2(N),
  localparam int SW        = $clog2(NDCT)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    din_valid,
  input  logic signed [PIX_W-1:0] din,
  output logic                    out_valid,
  output logic [SW-1:0]           out_src,
  output logic [LW-1:0]           out_l0,
  output logic signed [W-1:0]     out_xc [N],
  output logic                    overflow
);
  logic signed [PIX_W-1:0] sx;
  logic [NDCT-1:0]         sen;

  scan_proc #(.N(N), .CHANNELS(CHANNELS), .Y_CHANNELS(Y_CHANNELS), .NY(NY), .NDCT(NDCT),
              .PIX_W(PIX_W)) u_scan (
    .clk(clk), .rst(rst), .din_valid(din_valid), .din(din),
    .dout(sx), .dct_en(sen), .overflow(overflow));

  logic [NDCT-1:0]     v;
  logic [LW-1:0]       l0 [NDCT];
  logic signed [W-1:0] xc [NDCT][N];

  for (genvar p = 0; p < NDCT; p++) begin : g_dct
    logic signed [W-1:0] xs_unused [N];
    block_dct2d #(.N(N), .W(W), .F(F), .PIX_W(PIX_W)) u_dct (
      .clk(clk), .rst(rst), .en(sen[p]), .x(sx),
      .out_valid(v[p]), .out_l0(l0[p]), .xc(xc[p]), .xs(xs_unused));
  end

  dct_out_mux #(.NDCT(NDCT), .N(N), .W(W)) u_mux (
    .clk(clk), .rst(rst), .in_valid(v), .in_l0(l0), .in_xc(xc),
    .out_valid(out_valid), .out_src(out_src), .out_l0(out_l0), .out_xc(out_xc));

endmodule
