// sine_rom: 2^AW x DW sine look-up table with a registered read.
//
// Entry k holds one full period sampled at 2^AW points in offset binary:
//     rom[k] = 128 + round(127 * sin(2*pi*k / 2^AW))       (for DW = 8)
// so the values span 1..255 around the zero level 128. The design only says
// the 8192 x 8 table holds positive values within 0..255; the peak of 127
// (not 127.5) is this design's choice: it keeps the table symmetric, so that
// after the offset is removed the samples lie in -127..127 and the products
// formed by the modulator never overflow 8 bits.
//
// The table is computed when the memory is initialised, so no data file is
// needed. Timing: `q` shows the entry at `address` one clock after it is
// applied (one register stage, as the clocked ROM of the design).
module sine_rom #(
  parameter int unsigned AW = am_pkg::ROM_AW,
  parameter int unsigned DW = am_pkg::SAMPLE_W
) (
  input  logic          clk,
  input  logic [AW-1:0] address,
  output logic [DW-1:0] q
);

  localparam int unsigned DEPTH = 2 ** AW;
  localparam real         PI    = 3.14159265358979323846;
  localparam real         MID   = 2.0 ** (DW - 1);          // 128
  localparam real         AMP   = 2.0 ** (DW - 1) - 1.0;    // 127

  logic [DW-1:0] rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++)
      rom[k] = DW'($rtoi($floor(MID + AMP * $sin(2.0 * PI * k / DEPTH) + 0.5)));
  end

  always_ff @(posedge clk) q <= rom[address];

endmodule
