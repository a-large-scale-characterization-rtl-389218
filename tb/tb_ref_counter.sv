// Testbench for ref_counter: random enable patterns on a 50 MHz clock; the
// count must equal the number of cycles with the enable high since the last
// clear, and the clear must win over counting.
`timescale 1ns/1ps
module tb_ref_counter;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        clr, en;
  logic [31:0] count;
  int          model;

  always #10 clk = ~clk;

  ref_counter #(.W(32)) dut (.clk(clk), .clr(clr), .en(en), .count(count));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 1; model = 0;
    @(posedge clk); #1;
    checks++;
    if (count != 0) begin failures++; $display("FAIL: clear wins over enable"); end
    clr = 0;
    for (int i = 0; i < 5000; i++) begin
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 500) == 0;
      @(posedge clk);
      if (clr) model = 0;
      else if (en) model++;
      #1;
      checks++;
      if (count != 32'(model)) begin
        failures++;
        $display("FAIL: cycle %0d count %0d expected %0d", i, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
