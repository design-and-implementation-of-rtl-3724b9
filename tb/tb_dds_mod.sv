// tb_dds_mod: runs the modulating-wave synthesizer with the 10 kHz code 3355
// and, later, the 10 MHz code 3355443. Every output sample is compared with
// the sine table value for the phase the accumulator held one clock earlier
// (phase = (n-1) * code mod 2^24 after the n-th edge since reset), and
// sig_mod must equal out_y - 128. The rising zero crossings of sig_mod give
// the period: 2^24 / 3355 = 5000.7 clocks (10.0 kHz at 50 MHz) and
// 2^24 / 3355443 = 5.0 clocks (10 MHz).
`timescale 1ns / 1ps
module tb_dds_mod;
  localparam int unsigned PW = 24;
  localparam int unsigned AW = 13;

  logic          clk = 1'b0;
  logic          reset;
  logic [PW-1:0] code;
  logic [7:0]    out_y;
  logic signed [7:0] sig_mod;

  int checks = 0, failures = 0;

  dds_mod #(.PHASE_W(PW), .ROM_AW(AW)) dut (
    .clk(clk), .reset(reset), .code_f_x(code), .out_y(out_y), .sig_mod(sig_mod));

  always #10 clk = ~clk;

  function automatic int rom_ref(longint phase);
    real v;
    longint idx = (phase % (64'd1 << PW)) >> (PW - AW);
    v = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979323846 * real'(idx) / real'(2 ** AW));
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: out_y=%0d sig_mod=%0d", what, $time, out_y, sig_mod);
    end
  endtask

  // Runs `cycles` edges after a reset and returns the mean crossing interval.
  task automatic run(input logic [PW-1:0] c, input int cycles, output real mean_period,
                     output int min_p, output int max_p);
    int last_cross, ncross, sum_p;
    logic signed [7:0] prev;
    code = c;
    @(negedge clk) reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    last_cross = -1; ncross = 0; sum_p = 0; min_p = 1 << 30; max_p = 0; prev = 0;
    for (int n = 1; n <= cycles; n++) begin
      @(posedge clk);
      #1;
      check(int'(out_y) == rom_ref(longint'(n - 1) * longint'(c)), "sample");
      check(int'(sig_mod) == int'(out_y) - 128, "offset removal");
      if (n > 1 && prev < 0 && sig_mod >= 0) begin
        if (last_cross >= 0) begin
          sum_p += n - last_cross; ncross++;
          if (n - last_cross < min_p) min_p = n - last_cross;
          if (n - last_cross > max_p) max_p = n - last_cross;
        end
        last_cross = n;
      end
      prev = sig_mod;
    end
    mean_period = ncross > 0 ? real'(sum_p) / real'(ncross) : 0.0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p;
    int mn, mx;
    reset = 1'b1;
    code = '0;
    run(24'd3355, 26000, p, mn, mx);
    $display("code 3355: mean period %f clocks (%f Hz at 50 MHz), %0d..%0d", p, 50.0e6 / p, mn, mx);
    check(p > 5000.0 && p < 5001.4, "10 kHz period");
    check(mn >= 5000 && mx <= 5001, "10 kHz period spread");
    run(24'd3355443, 2000, p, mn, mx);
    $display("code 3355443: mean period %f clocks", p);
    check(p > 4.99 && p < 5.01, "10 MHz period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
