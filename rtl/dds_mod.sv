// dds_mod: direct digital synthesizer of the modulating sine wave.
//
// A PHASE_W-bit phase accumulator adds the frequency code every clock; its top
// ROM_AW bits address the sine table, and 128 is subtracted from the table
// output to give a two's-complement sample. The output frequency is
//     F_MOD = code_f_x * F_CLK / 2^PHASE_W   (code 3355 -> 10.0 kHz at 50 MHz).
// This structure (accumulator, ROM addressed by phase[23:11], subtract 128) is
// the one the design describes.
//
// Interface: `out_y` is the raw unsigned table sample (offset binary, brought
// out to a DAC so the modulating wave can be watched), `sig_mod` the same
// sample minus 128, read as signed. `reset` clears the phase asynchronously.
// Timing: a phase value appears on out_y/sig_mod one clock after it is in the
// accumulator (ROM register); after reset, sample k of the sine is the one for
// phase (k-1)*code.
module dds_mod #(
  parameter int unsigned PHASE_W = am_pkg::PHASE_W,
  parameter int unsigned ROM_AW  = am_pkg::ROM_AW
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [PHASE_W-1:0]        code_f_x,
  output logic [am_pkg::SAMPLE_W-1:0] out_y,
  output am_pkg::sample_t           sig_mod
);

  logic [PHASE_W-1:0] phase;

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk   (clk),
    .aclr  (reset),
    .data  (code_f_x),
    .result(phase)
  );

  sine_rom #(.AW(ROM_AW), .DW(am_pkg::SAMPLE_W)) u_rom (
    .clk    (clk),
    .address(phase[PHASE_W-1 -: ROM_AW]),
    .q      (out_y)
  );

  assign sig_mod = am_pkg::sample_t'(out_y - am_pkg::SAMPLE_W'(am_pkg::OFFSET));

endmodule
