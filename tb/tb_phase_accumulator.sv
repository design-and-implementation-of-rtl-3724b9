// tb_phase_accumulator: checks the DDS phase register against a modulo-2^24
// running sum. After an asynchronous clear the phase must read 0 without a
// clock edge, then grow by the frequency code on every edge, wrapping at
// 2^24. The code is changed at random between edges, including 0 and the
// largest code, and the clear is pulsed once between edges.
`timescale 1ns / 1ps
module tb_phase_accumulator;
  localparam int unsigned W = 24;

  logic         clk = 1'b0;
  logic         aclr;
  logic [W-1:0] data;
  logic [W-1:0] result;

  int checks = 0, failures = 0;
  logic [W-1:0] model;
  int wraps = 0;

  phase_accumulator #(.W(W)) dut (.clk(clk), .aclr(aclr), .data(data), .result(result));

  always #10 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %s: result=%0d expected=%0d", what, result, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 24'd335544;
    aclr = 1'b1;
    #5;
    check('0, "clear without clock");
    @(negedge clk) aclr = 1'b0;
    model = '0;
    for (int i = 0; i < 5000; i++) begin
      case (i % 7)
        0:       data = '0;
        1:       data = '1;
        default: data = W'($urandom);
      endcase
      @(posedge clk);
      if (32'(model) + 32'(data) >= (32'd1 << W)) wraps++;
      model = model + data;
      #1 check(model, "accumulate");
      @(negedge clk);
      if (i == 2500) begin
        // asynchronous clear between edges
        aclr = 1'b1;
        #1 check('0, "async clear");
        aclr = 1'b0;
        model = '0;
      end
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL: phase never wrapped");
    end
    $display("phase wrapped %0d times", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
