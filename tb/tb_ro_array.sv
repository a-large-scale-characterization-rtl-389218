// Testbench for ro_array at a reduced size (4 x 8): enables each RO in turn
// for a fixed time, counts the rising edges of the selected output, and
// compares the count with the one predicted from that RO's own stage delay,
// STAGE_DELAY_NS * (1 + PV_SPREAD * ro_pv_offset(index)). Also checks that the
// output rests at 1 when disabled and that different ROs really differ.
`timescale 1ns/1ps
module tb_ro_array;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned ROWS = 4, COLS = 8, N = ROWS * COLS;
  localparam real D = 0.4876, SPREAD = 0.013;
  localparam real T_EN = 2000.0;

  logic [$clog2(N)-1:0] addr = '0;
  logic en = 0;
  logic ro_sel;

  ro_array #(.ROWS(ROWS), .COLS(COLS), .STAGE_DELAY_NS(D), .PV_SPREAD(SPREAD), .NOISE_SIGMA(0.0)) dut (
    .addr(addr), .en(en), .ro_sel(ro_sel));

  int rises = 0;
  always @(posedge ro_sel) rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int counts[N];
  int distinct;

  initial begin
    #20;
    for (int i = 0; i < N; i++) begin
      real per;
      int  expect_n;
      addr = i[$clog2(N)-1:0];
      #5;
      check(ro_sel == 1'b1, "stopped RO reads 1");
      rises = 0;
      en = 1;
      #(T_EN);
      en = 0;
      #20;
      per = 10.0 * D * (1.0 + SPREAD * ro_pv_offset(i));
      expect_n = int'($floor(T_EN / per));
      counts[i] = rises;
      check(rises == expect_n || rises == expect_n + 1,
            $sformatf("RO %0d: %0d edges, expected %0d", i, rises, expect_n));
    end
    distinct = 0;
    for (int i = 1; i < N; i++) if (counts[i] != counts[i-1]) distinct++;
    check(distinct > N / 2, $sformatf("process variation visible: %0d of %0d neighbours differ", distinct, N - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
