// scan_proc: scanning processor of the parallel HDTV DCT encoder. It turns a
// raster-scanned frame into the channel scan that the serial-input 2-D DCTs
// need, and deals the channels out to NDCT transform units.
//
// The frame is cut into vertical channels N pixels wide (CHANNELS of them per
// line: Y_CHANNELS of luminance followed by the colour-difference channels).
// Inside a channel pixels are scanned row by row, left to right, so every N
// consecutive lines of a channel form one N x N block delivered in exactly the
// order a block DCT consumes it. Luminance channel c goes to DCT c mod NY, the
// colour-difference channels go, in turn, to the remaining NDCT-NY units; with
// the default sizes every unit serves 48 channels.
//
// How it works (this design's own, the document gives only the pattern and
// the task): a double band buffer of 2 x N lines. Raster input fills one band
// while the other is read. The reader serves the units round robin, one pixel
// per cycle: in each round of NDCT cycles every unit gets the next pixel of
// its own channel scan, so each unit runs at 1/NDCT of the pixel rate, which is
// what makes NDCT slower units keep up with the pixel clock. Reading a band
// takes exactly as long as writing one, so a continuous input never overruns.
//
// Interface: din/din_valid one raster pixel per cycle at most, first pixel of
// a frame (or band) right after rst. dout is registered; dct_en is one-hot and
// names the unit that must take dout in this cycle (use it as that unit's
// clock enable). overflow is sticky and reports a band that arrived while both
// halves of the buffer were still waiting to be read.
module scan_proc #(
  parameter int N          = 8,
  parameter int CHANNELS   = 240,
  parameter int Y_CHANNELS = 192,
  parameter int NY         = 4,
  parameter int NDCT       = 5,
  parameter int PIX_W      = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    din_valid,
  input  logic signed [PIX_W-1:0] din,
  output logic signed [PIX_W-1:0] dout,
  output logic [NDCT-1:0]         dct_en,
  output logic                    overflow
);
  localparam int LINE_W  = CHANNELS * N;
  localparam int BAND    = N * LINE_W;
  localparam int NC      = NDCT - NY;
  localparam int CH_PER  = Y_CHANNELS / NY;   // channels per unit
  localparam int AW      = $clog2(2 * BAND);

  initial begin
    assert (Y_CHANNELS % NY == 0 && (CHANNELS - Y_CHANNELS) == NC * CH_PER)
      else $error("scan_proc: channels must divide evenly among the units");
  end

  logic signed [PIX_W-1:0] mem [2 * BAND];

  // ---- write side: raster order
  logic [$clog2(LINE_W)-1:0] wcol;
  logic [$clog2(N)-1:0]      wline;
  logic                      wbank;
  logic [1:0]                full;

  // ---- read side: channel scan
  logic                      rbank;
  logic [$clog2(NDCT)-1:0]   ph;      // unit served this cycle
  logic [$clog2(CH_PER)-1:0] blk;     // channel number within the unit
  logic [$clog2(N)-1:0]      rr, cc;  // row and column inside the block
  logic                      ractive;
  logic                      rdone;   // last pixel of the band is read now

  assign ractive = full[rbank];
  assign rdone   = ractive && ph == $clog2(NDCT)'(NDCT - 1) && blk == $clog2(CH_PER)'(CH_PER - 1)
                   && rr == $clog2(N)'(N - 1) && cc == $clog2(N)'(N - 1);

  logic [AW-1:0] waddr, raddr;
  int unsigned   ch;

  always_comb begin
    if (int'(ph) < NY) ch = int'(ph) + NY * int'(blk);
    else               ch = Y_CHANNELS + NC * int'(blk) + (int'(ph) - NY);
    raddr = AW'(int'(rbank) * BAND + int'(rr) * LINE_W + ch * N + int'(cc));
    waddr = AW'(int'(wbank) * BAND + int'(wline) * LINE_W + int'(wcol));
  end

  always_ff @(posedge clk) begin
    if (din_valid) mem[waddr] <= din;
    if (ractive)   dout <= mem[raddr];
  end

  logic wdone;
  assign wdone = din_valid && wcol == $clog2(LINE_W)'(LINE_W - 1) && wline == $clog2(N)'(N - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      wcol     <= '0;
      wline    <= '0;
      wbank    <= 1'b0;
      rbank    <= 1'b0;
      full     <= '0;
      ph       <= '0;
      blk      <= '0;
      rr       <= '0;
      cc       <= '0;
      dct_en   <= '0;
      overflow <= 1'b0;
    end else begin
      // writer
      if (din_valid) begin
        if (wcol == $clog2(LINE_W)'(LINE_W - 1)) begin
          wcol  <= '0;
          wline <= (wline == $clog2(N)'(N - 1)) ? '0 : wline + 1'b1;
        end else begin
          wcol <= wcol + 1'b1;
        end
        if (wcol == '0 && wline == '0 && full[wbank]) overflow <= 1'b1;
      end
      if (wdone) wbank <= ~wbank;
      // reader
      dct_en <= '0;
      if (ractive) begin
        dct_en[ph] <= 1'b1;
        if (ph == $clog2(NDCT)'(NDCT - 1)) begin
          ph <= '0;
          if (cc == $clog2(N)'(N - 1)) begin
            cc <= '0;
            if (rr == $clog2(N)'(N - 1)) begin
              rr  <= '0;
              blk <= (blk == $clog2(CH_PER)'(CH_PER - 1)) ? '0 : blk + 1'b1;
            end else begin
              rr <= rr + 1'b1;
            end
          end else begin
            cc <= cc + 1'b1;
          end
        end else begin
          ph <= ph + 1'b1;
        end
      end
      if (rdone) rbank <= ~rbank;
      // band flags: set by the writer, cleared by the reader
      for (int b = 0; b < 2; b++) begin
        if (wdone && wbank == 1'(b))      full[b] <= 1'b1;
        else if (rdone && rbank == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

endmodule
