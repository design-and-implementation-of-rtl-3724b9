// tb_scaler: checks the scaler on every (carrier, carrier type) pair with a
// sweep of product terms, plus random 24-bit words. Expected value:
//     out_x = (128 + (Y ? (am + car) / 2 : am + car)) mod 256
// with division truncating toward zero. For the value ranges the modulator
// produces (|am| <= |car| <= 127) the code must stay within 1..255.
`timescale 1ns / 1ps
module tb_scaler;
  import am_pkg::*;

  wide_t      am, car;
  logic       type_mod_a;
  logic [7:0] out_x;

  int checks = 0, failures = 0;

  scaler dut (.am(am), .car(car), .type_mod_a(type_mod_a), .out_x(out_x));

  task automatic apply(input int a, input int c, input bit y);
    int s, exp;
    am = wide_t'(a); car = wide_t'(c); type_mod_a = y;
    #1;
    s   = y ? (a + c) / 2 : a + c;
    exp = (128 + s) & 255;
    checks++;
    if (int'(out_x) != exp) begin
      failures++;
      $display("FAIL am=%0d car=%0d Y=%0d: out_x=%0d expected %0d", a, c, y, out_x, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = -127; c <= 127; c++) begin
      for (int a = -127; a <= 127; a += 3) begin
        apply(a, c, 1'b1);
        apply(a, 0, 1'b0);
      end
      checks++;
      if (out_x < 8'd1) begin
        failures++;
        $display("FAIL range");
      end
    end
    for (int i = 0; i < 2000; i++)
      apply(int'($urandom_range(2000000)) - 1000000, int'($urandom_range(2000000)) - 1000000, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
