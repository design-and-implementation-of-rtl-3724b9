// tb_dds_car: runs the carrier synthesizer with the 1 MHz code 335544 and the
// 2 MHz code 671089. Every sample is compared with the sine table value for
// the phase the accumulator held one clock earlier (after the n-th edge since
// reset: (n-1) * code mod 2^24), minus 128. The rising zero crossings give the
// period: 2^24 / 335544 = 50.0 clocks (1 MHz at 50 MHz) and 25.0 clocks.
`timescale 1ns / 1ps
module tb_dds_car;
  localparam int unsigned PW = 24;
  localparam int unsigned AW = 13;

  logic              clk = 1'b0;
  logic              reset;
  logic [PW-1:0]     code;
  logic signed [7:0] sig_car;

  int checks = 0, failures = 0;

  dds_car #(.PHASE_W(PW), .ROM_AW(AW)) dut (
    .clk(clk), .reset(reset), .code_f_y(code), .sig_car(sig_car));

  always #10 clk = ~clk;

  function automatic int rom_ref(longint phase);
    real v;
    longint idx = (phase % (64'd1 << PW)) >> (PW - AW);
    v = 127.0 * $sin(2.0 * 3.14159265358979323846 * real'(idx) / real'(2 ** AW));
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: sig_car=%0d", what, $time, sig_car);
    end
  endtask

  task automatic run(input logic [PW-1:0] c, input int cycles, output real mean_period);
    int last_cross, ncross, sum_p;
    logic signed [7:0] prev;
    code = c;
    @(negedge clk) reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    last_cross = -1; ncross = 0; sum_p = 0; prev = 0;
    for (int n = 1; n <= cycles; n++) begin
      @(posedge clk);
      #1;
      check(int'(sig_car) == rom_ref(longint'(n - 1) * longint'(c)), "sample");
      if (n > 1 && prev < 0 && sig_car >= 0) begin
        if (last_cross >= 0) begin
          sum_p += n - last_cross; ncross++;
        end
        last_cross = n;
      end
      prev = sig_car;
    end
    mean_period = ncross > 0 ? real'(sum_p) / real'(ncross) : 0.0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p;
    reset = 1'b1;
    code = '0;
    run(24'd335544, 10000, p);
    $display("code 335544: mean period %f clocks (%f Hz at 50 MHz)", p, 50.0e6 / p);
    check(p > 49.9 && p < 50.1, "1 MHz period");
    run(24'd671089, 5000, p);
    $display("code 671089: mean period %f clocks", p);
    check(p > 24.95 && p < 25.05, "2 MHz period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
