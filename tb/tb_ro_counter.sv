// Testbench for ro_counter: clocks it with a free-running "RO" clock that is
// gated on and off, checks the count of rising edges against a reference
// count kept by the testbench, and checks the asynchronous clear (applied
// while the clock is stopped) and wrap-around at a reduced width.
`timescale 1ns/1ps
module tb_ro_counter;
  int checks = 0, failures = 0;

  logic        ro_clk = 1'b1;
  logic        clr    = 1'b0;
  logic [31:0] count;
  logic [3:0]  count4;

  ro_counter #(.W(32)) dut   (.ro_clk(ro_clk), .clr(clr), .count(count));
  ro_counter #(.W(4))  dut4  (.ro_clk(ro_clk), .clr(clr), .count(count4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin
      #2.4 ro_clk = 1'b0;
      #2.4 ro_clk = 1'b1;
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total;

  initial begin
    #1 clr = 1'b1;
    #5;
    check(count == 0 && count4 == 0, "async clear with stopped clock");
    clr = 1'b0;
    #5;
    total = 0;
    for (int k = 0; k < 20; k++) begin
      int n = 1 + ($urandom % 300);
      pulses(n);
      total += n;
      #10;
      check(count == 32'(total), $sformatf("count %0d expected %0d", count, total));
      check(count4 == 4'(total), "4-bit counter wraps");
    end
    clr = 1'b1;
    #3;
    check(count == 0, "clear after counting");
    clr = 1'b0;
    pulses(256080 / 100);
    #5;
    check(count == 2560, "count after re-clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
