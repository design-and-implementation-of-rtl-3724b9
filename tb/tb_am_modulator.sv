// tb_am_modulator: drives the modulator with a new random MOD, CAR, m and
// carrier-type value on every clock and compares both outputs with the
// integer form of S_AM = S_CAR * [Y + (m/100) * S_MOD]:
//     am_s  = trunc(trunc(MOD * m / 100) * CAR / 127)
//     car_s = Y ? CAR : 0
// using the pipeline timing of the block: after clock edge j, am_s uses the
// MOD and m sampled at edge j-2 and the CAR sampled at edge j-1; car_s uses
// that same CAR and the carrier-type input of the current cycle. Extreme
// values (+-127, m = 0 and 100) are forced regularly.
`timescale 1ns / 1ps
module tb_am_modulator;
  import am_pkg::*;

  localparam int N = 20000;

  logic       clk = 1'b0;
  sample_t    mod_s, car;
  logic [7:0] m_mod;
  logic       type_mod;
  wide_t      am_s, car_s;

  int checks = 0, failures = 0;
  int h_mod[N], h_car[N], h_m[N];

  am_modulator dut (.clk(clk), .mod_s(mod_s), .m_mod(m_mod), .car(car),
                    .type_mod(type_mod), .am_s(am_s), .car_s(car_s));

  always #10 clk = ~clk;

  function automatic int rnd_sample();
    return int'($urandom_range(254)) - 127;
  endfunction

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_am, exp_car;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      case (j % 11)
        3:       begin h_mod[j] = 127;  h_car[j] = -127; h_m[j] = 100; end
        7:       begin h_mod[j] = -127; h_car[j] = -127; h_m[j] = 100; end
        9:       begin h_mod[j] = rnd_sample(); h_car[j] = rnd_sample(); h_m[j] = 0; end
        default: begin h_mod[j] = rnd_sample(); h_car[j] = rnd_sample(); h_m[j] = int'($urandom_range(100)); end
      endcase
      mod_s    = sample_t'(h_mod[j]);
      car      = sample_t'(h_car[j]);
      m_mod    = 8'(h_m[j]);
      type_mod = 1'($urandom);
      @(posedge clk);
      #1;
      if (j >= 2) begin
        exp_am  = ((h_mod[j-2] * h_m[j-2]) / 100) * h_car[j-1] / 127;
        exp_car = type_mod ? h_car[j-1] : 0;
        checks += 2;
        if (int'(am_s) != exp_am) begin
          failures++;
          $display("FAIL am_s cycle %0d: %0d expected %0d", j, am_s, exp_am);
        end
        if (int'(car_s) != exp_car) begin
          failures++;
          $display("FAIL car_s cycle %0d: %0d expected %0d", j, car_s, exp_car);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
