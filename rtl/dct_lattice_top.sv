// dct_lattice_top: the frame-recursive lattice 2-D DCT designs side by side.
//   * hdtv_*: the parallel HDTV DCT encoder (scanning processor, five block
//     2-D DCT units, output multiplexer), which uses the block architecture.
//   * pm_*:   the postmatrix moving-frame 2-D DCT/DSCT.
//   * pr_*:   the prematrix moving-frame 2-D DCT/DSCT.
// The three share only clock and reset; see the instantiated modules for the
// behaviour and timing of each port group.
module dct_lattice_top #(
  parameter int N          = 8,
  parameter int CHANNELS   = 240,
  parameter int Y_CHANNELS = 192,
  parameter int NY         = 4,
  parameter int NDCT       = 5,
  parameter int PIX_W      = 8,
  parameter int W          = 12,
  parameter int F          = 2,
  parameter int MW         = 20,  // word length of the moving-frame designs
  parameter int MF         = 8,   // their fraction bits
  localparam int LW        = $clog2(N),
  localparam int SW        = $clog2(NDCT)
) (
  input  logic                    clk,
  input  logic                    rst,
  // HDTV DCT encoder
  input  logic                    hdtv_din_valid,
  input  logic signed [PIX_W-1:0] hdtv_din,
  output logic                    hdtv_out_valid,
  output logic [SW-1:0]           hdtv_out_src,
  output logic [LW-1:0]           hdtv_out_l0,
  output logic signed [W-1:0]     hdtv_out_xc [N],
  output logic                    hdtv_overflow,
  // postmatrix moving-frame 2-D DCT
  input  logic                    pm_en,
  input  logic signed [PIX_W-1:0] pm_x,
  output logic                    pm_out_valid,
  output logic [LW-1:0]           pm_out_l0,
  output logic signed [MW-1:0]    pm_xc [N],
  output logic signed [MW-1:0]    pm_xs [N],
  // prematrix moving-frame 2-D DCT
  input  logic                    pr_en,
  input  logic signed [PIX_W-1:0] pr_x,
  output logic                    pr_out_valid,
  output logic [LW-1:0]           pr_out_l0,
  output logic signed [MW-1:0]    pr_xc [N],
  output logic signed [MW-1:0]    pr_xs [N]
);
  hdtv_dct_encoder #(.N(N), .CHANNELS(CHANNELS), .Y_CHANNELS(Y_CHANNELS), .NY(NY),
                     .NDCT(NDCT), .PIX_W(PIX_W), .W(W), .F(F)) u_hdtv (
    .clk(clk), .rst(rst), .din_valid(hdtv_din_valid), .din(hdtv_din),
    .out_valid(hdtv_out_valid), .out_src(hdtv_out_src), .out_l0(hdtv_out_l0),
    .out_xc(hdtv_out_xc), .overflow(hdtv_overflow));

  postmatrix_dct2d #(.N(N), .W(MW), .F(MF), .PIX_W(PIX_W)) u_post (
    .clk(clk), .rst(rst), .en(pm_en), .x(pm_x),
    .out_valid(pm_out_valid), .out_l0(pm_out_l0), .xc(pm_xc), .xs(pm_xs));

  prematrix_dct2d #(.N(N), .W(MW), .F(MF), .PIX_W(PIX_W)) u_pre (
    .clk(clk), .rst(rst), .en(pr_en), .x(pr_x),
    .out_valid(pr_out_valid), .out_l0(pr_out_l0), .xc(pr_xc), .xs(pr_xs));
endmodule
