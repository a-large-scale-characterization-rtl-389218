// Testbench for ro_cell: checks that the cell rests at 1 while disabled,
// oscillates with period 10 x stage delay once enabled (first rising edge
// after 10 stage delays), stops again when disabled, and that with noise
// enabled the period stays within the noise bound.
`timescale 1ns/1ps
module tb_ro_cell;
  int checks = 0, failures = 0;

  logic en0 = 0, en1 = 0;
  logic out0, out1;

  ro_cell #(.STAGE_DELAY_NS(0.5), .NOISE_SIGMA(0.0))   dut0 (.en(en0), .ro_out(out0));
  ro_cell #(.STAGE_DELAY_NS(0.5), .NOISE_SIGMA(0.001)) dut1 (.en(en1), .ro_out(out1));

  int      rises0 = 0, rises1 = 0;
  realtime t_first0, t_last0, t_first1, t_last1;

  // Edge times are recorded only while enabled; the edge count includes the
  // one final rising edge with which a stopped ring returns to its rest level.
  int en_rises0 = 0, en_rises1 = 0;
  always @(posedge out0) begin
    if (en0) begin
      if (en_rises0 == 0) t_first0 = $realtime;
      t_last0 = $realtime;
      en_rises0++;
    end
    rises0++;
  end
  always @(posedge out1) begin
    if (en1) begin
      if (en_rises1 == 0) t_first1 = $realtime;
      t_last1 = $realtime;
      en_rises1++;
    end
    rises1++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_en, per;

  initial begin
    #30;
    rises0 = 0;
    #20;
    check(out0 == 1'b1, "disabled cell rests at 1");
    check(rises0 == 0, "no edges while disabled");
    rises0 = 0;
    en_rises0 = 0;
    t_en = $realtime;
    en0 = 1;
    #1002;
    en0 = 0;
    #20;
    // rising edges at t_en + 5 ns * k, k = 1..200, then one more when the
    // stopped ring settles back to 1
    check(en_rises0 == 200, $sformatf("200 rising edges in 1002 ns, got %0d", en_rises0));
    check(rises0 == 201, $sformatf("one trailing edge after disable, got %0d", rises0 - en_rises0));
    check((t_first0 - t_en) > 4.99 && (t_first0 - t_en) < 5.01,
          $sformatf("first rising edge after 10 stage delays, got %f", t_first0 - t_en));
    per = (t_last0 - t_first0) / (en_rises0 - 1);
    check(per > 4.999 && per < 5.001, $sformatf("period 5 ns, got %f", per));
    check(out0 == 1'b1, "stopped cell returns to 1");
    rises0 = 0;
    #200;
    check(rises0 == 0, "no edges after disable");

    // several enable periods with noise: period within +-sqrt(3)*0.1 %
    repeat (5) begin
      en_rises1 = 0;
      en1 = 1;
      #500;
      en1 = 0;
      #20;
      per = (t_last1 - t_first1) / (en_rises1 - 1);
      check(per > 5.0 * (1 - 0.0018) && per < 5.0 * (1 + 0.0018),
            $sformatf("noisy period near 5 ns, got %f", per));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
