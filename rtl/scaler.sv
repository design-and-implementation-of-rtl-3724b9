// scaler: brings the modulator's 24-bit result back to an 8-bit DAC code.
//
// The carrier term and the product term are added. With the carrier present
// the sum reaches twice the carrier amplitude, so it is halved; without the
// carrier the product term alone already fits and passes undivided. 128 is
// then added to return to offset binary and the low 8 bits drive the DAC:
//     out_x = 128 + (type_mod_a ? (am + car) / 2 : am + car)
// (car is 0 when the carrier is suppressed). This is the adder, divide-by-2,
// multiplexer and +128 adder of the design's scaling algorithm.
//
// Timing: purely combinational, as in the design. The division truncates
// toward zero (this design's choice). For inputs produced by am_modulator the
// result stays in 1..255, so taking the low 8 bits never wraps.
module scaler
  import am_pkg::*;
(
  input  wide_t               am,
  input  wide_t               car,
  input  logic                type_mod_a,
  output logic [SAMPLE_W-1:0] out_x
);

  wide_t sum, half, sel, z;

  always_comb begin
    sum   = am + car;
    half  = sum / wide_t'(SCALE_DIV);
    sel   = type_mod_a ? half : sum;
    z     = sel + wide_t'(OFFSET);
    out_x = z[SAMPLE_W-1:0];
  end

endmodule
