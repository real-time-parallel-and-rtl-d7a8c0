// da_cmul: multiplies one W-bit two's-complement word by two fixed real
// constants C0 and C1 with distributed arithmetic, i.e. with look-up tables and
// adders instead of multipliers.
//
// The input is cut into W/4 nibbles. Each nibble addresses a 16-entry ROM whose
// entry is a pair of ROM_W-bit products (nibble value * C0, nibble value * C1),
// so each ROM is 16 x (2*ROM_W) bits. The ROM outputs are aligned four bits
// apart (the most significant nibble unshifted, the next ones 4 and 8 bits
// further right) and summed, giving x*C0 and x*C1 in the input's number format.
// With W = 12 this is three 16x24 ROMs and four adders, the arrangement used for
// every constant-coefficient pair of a lattice module.
//
// Own choices: the most significant nibble is read as signed (entries hold
// value*C*2^(ROM_W-4), rounded), the others as unsigned (value*C*2^(ROM_W-5),
// one bit less so that 15*|C| still fits); with |C| < 1 no entry overflows.
// The aligned sum is kept exact and rounded once at the end, which keeps the
// error of a product below about 0.7 LSB.
// |C0|, |C1| must be below 1. ROM contents are computed at elaboration time.
//
// Timing: purely combinational.
module da_cmul #(
  parameter int  W     = 12,
  parameter int  ROM_W = 12,
  parameter real C0    = 0.5,
  parameter real C1    = 0.5
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p0,
  output logic signed [W-1:0] p1
);
  localparam int NIB = W / 4;           // number of ROMs
  localparam int SC  = ROM_W - 5;       // scale exponent of the unsigned-nibble ROMs
  localparam int SW  = ROM_W + 4 * (NIB - 1) + 2;  // exact sum width

  typedef logic signed [ROM_W-1:0] rom_t [16];

  function automatic rom_t mk_rom(real c, bit signed_idx);
    rom_t t;
    for (int v = 0; v < 16; v++) begin
      int  sv;
      real prod;
      sv   = (signed_idx && v >= 8) ? v - 16 : v;
      prod = c * real'(sv) * (2.0 ** (signed_idx ? SC + 1 : SC));
      t[v] = ROM_W'($rtoi(prod >= 0.0 ? prod + 0.5 : prod - 0.5));
    end
    return t;
  endfunction

  localparam rom_t ROM_TOP_0 = mk_rom(C0, 1'b1);
  localparam rom_t ROM_TOP_1 = mk_rom(C1, 1'b1);
  localparam rom_t ROM_LOW_0 = mk_rom(C0, 1'b0);
  localparam rom_t ROM_LOW_1 = mk_rom(C1, 1'b0);

  initial begin
    assert (W % 4 == 0) else $error("da_cmul: W must be a multiple of 4");
  end

  logic signed [SW-1:0] acc0, acc1;

  always_comb begin
    acc0 = '0;
    acc1 = '0;
    for (int j = 0; j < NIB; j++) begin
      logic [3:0] nib;
      logic signed [ROM_W-1:0] e0, e1;
      nib = x[4*j +: 4];
      if (j == NIB - 1) begin
        e0 = ROM_TOP_0[nib];
        e1 = ROM_TOP_1[nib];
      end else begin
        e0 = ROM_LOW_0[nib];
        e1 = ROM_LOW_1[nib];
      end
      // everything at scale 2^(SC+1): the unsigned-nibble entries move one
      // more place left
      acc0 = acc0 + (SW'(e0) <<< (4 * j + ((j == NIB - 1) ? 0 : 1)));
      acc1 = acc1 + (SW'(e1) <<< (4 * j + ((j == NIB - 1) ? 0 : 1)));
    end
    acc0 = acc0 + (SW'(1) <<< SC);
    acc1 = acc1 + (SW'(1) <<< SC);
    p0 = W'(acc0 >>> (SC + 1));
    p1 = W'(acc1 >>> (SC + 1));
  end

endmodule
