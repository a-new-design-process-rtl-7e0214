// sinc_rom: read-only memory of the sinc interpolation coefficients used by
// the peak interpolator (the multiplicand of the P4 interpolation products).
//
// Entry (o, k), stored at address o*(2H+1) + k, holds
//   round( sinc(d - j) * 2^SINC_FRAC ),  d = (o - F/2)/F,  j = k - H,
//   sinc(t) = sin(pi t)/(pi t),  sinc(0) = 1,
// for fractional offsets o = 0..F (d from -1/2 to +1/2 sample in steps of
// 1/F) and taps k = 0..2H (neighbours j = -H..H of the integer peak). Values
// are SINC_W-bit two's complement; 1.0 is 2^22 with the default 22 fraction
// bits, which fits the 24-bit word. The table for the default F = 8, H = 4
// (81 words) is loaded from sinc_rom.hex; other F or H need a table made by
// the same formula.
//
// Timing: data holds the word at addr one clock after addr is presented.
// The 24-bit width of the sinc multiplicand follows the document; the step
// count F, the span H and the unwindowed sinc are this design's choices.
module sinc_rom #(
  parameter int unsigned F      = 8,
  parameter int unsigned H      = 4,
  parameter int unsigned SINC_W = 24,
  localparam int unsigned DEPTH = (F + 1) * (2 * H + 1),
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic [AW-1:0]            addr,
  output logic signed [SINC_W-1:0] data
);

  logic [SINC_W-1:0] rom [DEPTH];

  initial $readmemh("rtl/sinc_rom.hex", rom);

  always_ff @(posedge clk) data <= rom[addr];

endmodule
