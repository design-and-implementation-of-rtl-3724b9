// dds_car: direct digital synthesizer of the carrier.
//
// Same structure as the modulating-wave synthesizer: a PHASE_W-bit phase
// accumulator, a 2^ROM_AW x 8 sine table addressed by the top ROM_AW phase
// bits, and subtraction of 128 to make the sample two's complement. The
// carrier frequency is
//     f_CAR = code_f_y * F_CLK / 2^PHASE_W   (code 335544 -> 1.0 MHz at 50 MHz),
// adjustable from about 3 Hz to F_CLK/2 in 2.98 Hz steps.
//
// Interface: `sig_car` is the signed carrier sample; `reset` clears the
// phase asynchronously. Timing: one clock from accumulator to sample (ROM
// register). Only the signed sample leaves this block, as in the design.
module dds_car #(
  parameter int unsigned PHASE_W = am_pkg::PHASE_W,
  parameter int unsigned ROM_AW  = am_pkg::ROM_AW
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [PHASE_W-1:0] code_f_y,
  output am_pkg::sample_t    sig_car
);

  logic [PHASE_W-1:0]          phase;
  logic [am_pkg::SAMPLE_W-1:0] q;

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk   (clk),
    .aclr  (reset),
    .data  (code_f_y),
    .result(phase)
  );

  sine_rom #(.AW(ROM_AW), .DW(am_pkg::SAMPLE_W)) u_rom (
    .clk    (clk),
    .address(phase[PHASE_W-1 -: ROM_AW]),
    .q      (q)
  );

  assign sig_car = am_pkg::sample_t'(q - am_pkg::SAMPLE_W'(am_pkg::OFFSET));

endmodule
