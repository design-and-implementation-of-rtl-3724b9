// am_dds: digital amplitude modulator built from two direct digital
// synthesizers, for a 50 MHz FPGA clock.
//
// One DDS produces the modulating sine (frequency code code_f_x), a second
// the carrier (code_f_y); f = code * 50 MHz / 2^24, so 3355 gives 10 kHz and
// 335544 gives 1 MHz. The modulator multiplies the modulating sample by the
// modulation factor m (percent, 0..100), divides by 100, optionally adds the
// unit carrier term and multiplies by the carrier:
//     S_AM(i) = S_CAR(i) * [Y + (m/100) * S_MOD(i)]
// with Y = type_mod (1 = AM with carrier, 0 = carrier suppressed). The scaler
// halves the with-carrier result and shifts it to offset binary for the DAC.
//
// Interface: x is the AM sample and y the modulating sample, both 8-bit
// offset binary (128 = zero level). reset_dds clears both phase
// accumulators asynchronously, so both waves restart at phase 0 together.
// Timing: a change of m_mod reaches x after 3 clock edges, a change of
// type_mod at once (it steers a multiplexer and the scaler). After reset_dds
// is released, x after the j-th clock edge is built from the carrier sample
// for phase (j-3)*code_f_y and the modulating sample for phase (j-4)*code_f_x.
// The block structure and all constants follow the design description;
// pipeline depths and the exact sine table are this design's choices (see
// am_modulator and sine_rom). The DAC, reconstruction filter and clock
// oscillator are outside this RTL.
module am_dds #(
  parameter int unsigned PHASE_W = am_pkg::PHASE_W,
  parameter int unsigned ROM_AW  = am_pkg::ROM_AW
) (
  input  logic                        clk,
  input  logic                        reset_dds,
  input  logic [PHASE_W-1:0]          code_f_x,
  input  logic [PHASE_W-1:0]          code_f_y,
  input  logic [am_pkg::SAMPLE_W-1:0] m_mod,
  input  logic                        type_mod,
  output logic [am_pkg::SAMPLE_W-1:0] x,
  output logic [am_pkg::SAMPLE_W-1:0] y
);

  am_pkg::sample_t sig_mod, sig_car;
  am_pkg::wide_t   am_s, car_s;

  dds_mod #(.PHASE_W(PHASE_W), .ROM_AW(ROM_AW)) u_dds_mod (
    .clk     (clk),
    .reset   (reset_dds),
    .code_f_x(code_f_x),
    .out_y   (y),
    .sig_mod (sig_mod)
  );

  dds_car #(.PHASE_W(PHASE_W), .ROM_AW(ROM_AW)) u_dds_car (
    .clk     (clk),
    .reset   (reset_dds),
    .code_f_y(code_f_y),
    .sig_car (sig_car)
  );

  am_modulator u_modulator (
    .clk     (clk),
    .mod_s   (sig_mod),
    .m_mod   (m_mod),
    .car     (sig_car),
    .type_mod(type_mod),
    .am_s    (am_s),
    .car_s   (car_s)
  );

  scaler u_scaler (
    .am        (am_s),
    .car       (car_s),
    .type_mod_a(type_mod),
    .out_x     (x)
  );

endmodule
