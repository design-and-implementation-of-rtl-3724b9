// tb_am_dds: end-to-end test of the AM modulator at its default sizes
// (24-bit phase, 8192 x 8 sine tables) with the 1 MHz carrier (code 335544)
// and the 10 kHz modulating wave (code 3355) on a 50 MHz clock.
//
// After one reset the design runs through a sequence of settings without
// further resets: AM with carrier at m = 0, 30, 60, 100 %, then the carrier
// suppressed at m = 100, 30, 0 %, and with carrier again at m = 50 %. For each
// setting, 15000 clocks (three modulation periods) are checked in three ways:
//   * sample by sample against an integer model of
//       X = 128 + (Y ? (CAR + trunc(trunc(MOD*m/100)*CAR/127)) / 2
//                    :       trunc(trunc(MOD*m/100)*CAR/127))
//     where, after the j-th clock edge since reset, MOD is the table sample
//     for phase (j-4)*3355 and CAR the one for phase (j-3)*335544;
//   * in the time domain: the peak of |X-128| in each carrier period gives the
//     envelope, and for AM with carrier m = (Umax-Umin)/(Umax+Umin)*100 must
//     match the setting within 4 %; without carrier the envelope peak must be
//     127*m/100 and its minimum must fall near zero;
//   * in the frequency domain: Hann-windowed correlations at f_CAR and
//     f_CAR +- F_MOD must show sidebands of m/2 of the carrier line, or
//     without carrier a carrier line below 2 % of the sidebands.
// The Y output must also repeat every 5000.7 clocks (10.0 kHz). Each
// mechanism (both carrier types, the switch between them, m = 0 and m = 100,
// phase-accumulator wrap-around of both synthesizers, the reset) is counted
// and a failure is counted for any that never happened.
`timescale 1ns / 1ps
module tb_am_dds;
  localparam int unsigned PW = 24;
  localparam int unsigned AW = 13;
  localparam longint CODE_MOD = 3355;
  localparam longint CODE_CAR = 335544;
  localparam int NSAMP = 15000;
  localparam int CAR_PERIOD = 50;
  localparam real PI = 3.14159265358979323846;

  logic          clk = 1'b0;
  logic          reset_dds;
  logic [PW-1:0] code_f_x, code_f_y;
  logic [7:0]    m_mod;
  logic          type_mod;
  logic [7:0]    x, y;

  int checks = 0, failures = 0;
  longint j = 0;          // clock edges since reset release

  // mechanism counters
  int n_with = 0, n_without = 0, n_switch = 0, n_m0 = 0, n_m100 = 0;
  int n_wrap_mod = 0, n_wrap_car = 0, n_reset = 0;

  am_dds dut (
    .clk(clk), .reset_dds(reset_dds), .code_f_x(code_f_x), .code_f_y(code_f_y),
    .m_mod(m_mod), .type_mod(type_mod), .x(x), .y(y));

  always #10 clk = ~clk;

  always @(posedge clk) j <= reset_dds ? 0 : j + 1;

  function automatic int sine_ref(longint phase);
    longint idx;
    if (phase < 0) return 0;
    idx = (phase % (64'd1 << PW)) >> (PW - AW);
    return $rtoi($floor(127.0 * $sin(2.0 * PI * real'(idx) / real'(2 ** AW)) + 0.5));
  endfunction

  function automatic int x_ref(longint jj, int m, bit yc);
    int md, cr, am;
    md = sine_ref((jj - 4) * CODE_MOD);
    cr = sine_ref((jj - 3) * CODE_CAR);
    am = ((md * m) / 100) * cr / 127;
    return yc ? 128 + (cr + am) / 2 : 128 + am;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (edge %0d, x=%0d)", what, j, x);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
    if ((j * CODE_MOD) % (64'd1 << PW) < CODE_MOD) n_wrap_mod++;
    if ((j * CODE_CAR) % (64'd1 << PW) < CODE_CAR) n_wrap_car++;
  endtask

  // Hann-windowed amplitude of one frequency (cycles per clock) in buf.
  function automatic real line_amp(const ref int buffer[NSAMP], input real f);
    real re = 0.0, im = 0.0, wsum = 0.0, w;
    for (int k = 0; k < NSAMP; k++) begin
      w = 0.5 - 0.5 * $cos(2.0 * PI * k / NSAMP);
      re += w * buffer[k] * $cos(2.0 * PI * f * k);
      im -= w * buffer[k] * $sin(2.0 * PI * f * k);
      wsum += w;
    end
    return 2.0 * $sqrt(re * re + im * im) / wsum;
  endfunction

  int samples[NSAMP];

  task automatic run_setting(input int m, input bit yc);
    int peak, umax, umin, y_prev, y_cross_last, y_periods, y_sum;
    real fc, fm, a_c, a_u, a_l, m_meas;
    @(negedge clk);
    if (yc != type_mod) n_switch++;
    m_mod = 8'(m);
    type_mod = yc;
    repeat (4) tick();
    umax = 0; umin = 1 << 30; peak = 0;
    y_prev = y; y_cross_last = -1; y_periods = 0; y_sum = 0;
    for (int k = 0; k < NSAMP; k++) begin
      tick();
      check(int'(x) == x_ref(j, m, yc), "AM sample");
      check(int'(y) == 128 + sine_ref((j - 1) * CODE_MOD), "modulating sample");
      samples[k] = int'(x) - 128;
      if ((samples[k] < 0 ? -samples[k] : samples[k]) > peak)
        peak = samples[k] < 0 ? -samples[k] : samples[k];
      if (k % CAR_PERIOD == CAR_PERIOD - 1) begin
        if (peak > umax) umax = peak;
        if (peak < umin) umin = peak;
        peak = 0;
      end
      if (y_prev < 128 && y >= 128) begin
        if (y_cross_last >= 0) begin y_sum += k - y_cross_last; y_periods++; end
        y_cross_last = k;
      end
      y_prev = y;
    end
    check(y_periods > 0 && real'(y_sum) / y_periods > 5000.0 && real'(y_sum) / y_periods < 5001.4,
          "modulating period 10 kHz");
    fc  = real'(CODE_CAR) / real'(64'd1 << PW);
    fm  = real'(CODE_MOD) / real'(64'd1 << PW);
    a_c = line_amp(samples, fc);
    a_u = line_amp(samples, fc + fm);
    a_l = line_amp(samples, fc - fm);
    if (yc) begin
      m_meas = real'(umax - umin) / real'(umax + umin) * 100.0;
      $display("with carrier    m=%3d: Umax=%0d Umin=%0d -> m=%5.1f %% | lines: carrier %5.2f  USB %5.2f  LSB %5.2f",
               m, umax, umin, m_meas, a_c, a_u, a_l);
      check(m_meas > m - 4.0 && m_meas < m + 4.0, "envelope modulation factor");
      check(a_c > 60.0 && a_c < 66.0, "carrier line");
      check((a_u + a_l) / 2.0 / a_c > m / 200.0 - 0.02 && (a_u + a_l) / 2.0 / a_c < m / 200.0 + 0.02,
            "sideband to carrier ratio");
      n_with++;
    end else begin
      $display("without carrier m=%3d: Umax=%0d Umin=%0d | lines: carrier %5.2f  USB %5.2f  LSB %5.2f",
               m, umax, umin, a_c, a_u, a_l);
      check(umax >= 127 * m / 100 - 3 && umax <= 127 * m / 100 + 1, "envelope peak");
      check(umin <= 8, "envelope reaches zero");
      check(a_c <= 0.02 * (a_u + a_l) / 2.0 + 0.3, "carrier suppressed");
      check(a_u > 127.0 * m / 200.0 - 1.5 && a_u < 127.0 * m / 200.0 + 1.5, "upper sideband");
      check(a_l > 127.0 * m / 200.0 - 1.5 && a_l < 127.0 * m / 200.0 + 1.5, "lower sideband");
      n_without++;
    end
    if (m == 0)   n_m0++;
    if (m == 100) n_m100++;
  endtask

  initial begin
    #(20ns * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_f_x  = PW'(CODE_MOD);
    code_f_y  = PW'(CODE_CAR);
    m_mod     = 8'd0;
    type_mod  = 1'b1;
    reset_dds = 1'b1;
    repeat (3) @(negedge clk);
    reset_dds = 1'b0;
    n_reset++;
    run_setting(0, 1'b1);
    run_setting(30, 1'b1);
    run_setting(60, 1'b1);
    run_setting(100, 1'b1);
    run_setting(100, 1'b0);
    run_setting(30, 1'b0);
    run_setting(0, 1'b0);
    run_setting(50, 1'b1);
    $display("mechanisms: with carrier %0d, without %0d, switches %0d, m=0 %0d, m=100 %0d, wraps mod %0d car %0d, resets %0d",
             n_with, n_without, n_switch, n_m0, n_m100, n_wrap_mod, n_wrap_car, n_reset);
    check(n_with > 0,     "AM with carrier exercised");
    check(n_without > 0,  "AM without carrier exercised");
    check(n_switch > 0,   "carrier type switched");
    check(n_m0 > 0,       "m = 0 exercised");
    check(n_m100 > 0,     "m = 100 exercised");
    check(n_wrap_mod > 0, "modulating phase wrapped");
    check(n_wrap_car > 0, "carrier phase wrapped");
    check(n_reset > 0,    "reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
