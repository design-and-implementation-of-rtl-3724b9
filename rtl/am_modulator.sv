// am_modulator: forms the two terms of the digital AM relation
//     S_AM(i) = S_CAR(i) * [Y + (m/100) * S_MOD(i)],   Y = 1 or 0.
//
// Product path (as the design describes it):
//     p1   = MOD * m                (8 x 8 signed multiply, 16 bits, registered)
//     q1   = p1 / 100               (combinational divide, m is in percent)
//     p2   = q1 * CAR               (16 x 8 signed multiply, 24 bits)
//     am_s = p2 / 127               (combinational divide back to carrier scale)
// Carrier path: CAR is multiplied by 1 twice (two register stages, widened to
// 16 then 24 bits) and a multiplexer passes it (type_mod = 1, AM with carrier)
// or the constant 0 (type_mod = 0, carrier suppressed) to car_s.
// With MOD, CAR in -127..127 and m in 0..100, |am_s| <= |CAR| <= 127.
//
// Timing (this design's choice; the description gives clocked multipliers but
// not their depth): the MOD x m multiplier has one register stage and the
// q1 x CAR multiplier two, so a carrier sample reaches am_s and car_s on the
// same clock edge, two clocks after it is applied. MOD and m reach am_s after
// three clocks. Divisions truncate toward zero. There is no reset: the
// pipeline is valid three clocks after its inputs are.
module am_modulator
  import am_pkg::*;
(
  input  logic                clk,
  input  sample_t             mod_s,
  input  logic [SAMPLE_W-1:0] m_mod,
  input  sample_t             car,
  input  logic                type_mod,
  output wide_t               am_s,
  output wide_t               car_s
);

  prod_t p1;          // MOD * m
  prod_t q1;          // MOD * m / 100
  wide_t p2_a, p2;    // q1 * CAR, two stages
  prod_t c1;          // CAR * 1
  wide_t c2;          // CAR * 1 * 1

  always_ff @(posedge clk) begin
    p1   <= PROD_W'(mod_s) * PROD_W'(sample_t'(m_mod));
    p2_a <= WIDE_W'(q1) * WIDE_W'(car);
    p2   <= p2_a;
    c1   <= PROD_W'(car);
    c2   <= WIDE_W'(c1);
  end

  assign q1    = p1 / prod_t'(M_DIV);
  assign am_s  = p2 / wide_t'(CAR_DIV);
  assign car_s = type_mod ? c2 : '0;

endmodule
