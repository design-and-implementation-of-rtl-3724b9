// phase_accumulator: the phase register of a direct digital synthesizer.
//
// Every clock the frequency code `data` is added to the W-bit phase held in
// `result`; the sum wraps modulo 2^W, so the phase completes one turn every
// 2^W / data clocks and the synthesized frequency is data * F_CLK / 2^W.
// With W = 24 and a 50 MHz clock the step is 2.98 Hz, the resolution the
// design asks for.
//
// Interface: `aclr` clears the phase asynchronously (active high). `result`
// is the registered phase: after reset it reads 0, then data, 2*data, ...
// The accumulator is unsigned and has no carry out, as in the design. The
// clear polarity is this design's choice.
module phase_accumulator #(
  parameter int unsigned W = am_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         aclr,
  input  logic [W-1:0] data,
  output logic [W-1:0] result
);

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) result <= '0;
    else      result <= result + data;
  end

endmodule
