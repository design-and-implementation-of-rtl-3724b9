// tb_sine_rom: reads every entry of the 8192 x 8 sine table and compares it
// with 128 + round(127 * sin(2*pi*k/8192)). It also checks the one-clock read
// latency (q must not change q_prev the clock edge), the range 1..255, the
// zero level at k = 0 and k = 4096 and the peaks at k = 2048 and k = 6144.
`timescale 1ns / 1ps
module tb_sine_rom;
  localparam int unsigned AW = 13;
  localparam int unsigned DEPTH = 2 ** AW;

  logic          clk = 1'b0;
  logic [AW-1:0] address;
  logic [7:0]    q;

  int checks = 0, failures = 0;

  sine_rom #(.AW(AW), .DW(8)) dut (.clk(clk), .address(address), .q(q));

  always #10 clk = ~clk;

  function automatic int expected(int k);
    real v;
    v = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(DEPTH));
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (address %0d q=%0d)", what, address, q);
    end
  endtask

  initial begin
    repeat (3 * DEPTH) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q_prev;
    address = '0;
    @(posedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      q_prev  = q;
      address = AW'((k * 5) % DEPTH);   // visit all entries in a scrambled order
      #1 check(q == q_prev, "q changed before the clock edge");
      @(posedge clk);
      #1;
      check(int'(q) == expected((k * 5) % DEPTH), "table entry");
      check(q >= 8'd1, "range");
      if (address == 0 || address == AW'(DEPTH / 2)) check(q == 8'd128, "zero level");
      if (address == AW'(DEPTH / 4))                 check(q == 8'd255, "positive peak");
      if (address == AW'(3 * DEPTH / 4))             check(q == 8'd1,   "negative peak");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
