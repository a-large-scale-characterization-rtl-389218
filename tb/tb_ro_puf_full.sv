// Full-size testbench: ro_puf_top with every parameter at its default
// (512 ROs in 16 x 32, 32-bit counters). Simulating all 512 oscillators is
// slow, so it measures a sample of ROs spread over the array (the corners,
// both ends of a row and of the index range, and adjacent pairs), each through
// the complete host sequence CLEAR, ENABLE(addr), DISABLE, LOAD and read-back.
// It checks each RO count against the count predicted from that RO's delay
// and the measured enable time, the calibrated frequency
// ro_count * 50 / ref_count MHz, and the response bit of each adjacent pair.
`timescale 1ns/1ps
module tb_ro_puf_full;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  localparam real D = 0.4876, SPRD = 0.013;   // top defaults
  localparam int  NS = 10;
  localparam int  SAMPLE[NS] = '{0, 1, 31, 32, 255, 256, 480, 481, 510, 511};

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic drck, sel, shift, update, tdi, tdo, busy, ro_enable;

  ro_puf_top dut (
    .clk(clk), .rst(rst), .jtag_drck(drck), .jtag_sel(sel), .jtag_shift(shift),
    .jtag_update(update), .jtag_tdi(tdi), .jtag_tdo(tdo), .busy(busy), .ro_enable(ro_enable));

  jtag_host #(.W(64), .HALF_NS(100.0)) host (
    .drck(drck), .sel(sel), .shift(shift), .update(update), .tdi(tdi), .tdo(tdo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] mk_cmd(input cmd_op_e op, input int addr);
    cmd_t c;
    c.op = op;
    c.addr = ADDR_W'(addr);
    return 64'(c);
  endfunction

  function automatic real period_ns(input int i);
    return 10.0 * D * (1.0 + SPRD * ro_pv_offset(i));
  endfunction

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ro_cnt[NS], ref_cnt[NS];
  logic [63:0] dout;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    for (int s = 0; s <= NS; s++) begin
      host.dr_scan(s < NS ? mk_cmd(CMD_CLEAR, 0) : mk_cmd(CMD_NOP, 0), dout);
      if (s > 0) begin
        ro_cnt[s-1]  = dout[31:0];
        ref_cnt[s-1] = dout[63:32];
      end
      if (s == NS) break;
      host.dr_scan(mk_cmd(CMD_ENABLE, SAMPLE[s]), dout);
      check(ro_enable && dut.ro_addr == ADDR_W'(SAMPLE[s]), "RO running at the requested address");
      host.dr_scan(mk_cmd(CMD_DISABLE, 0), dout);
      host.dr_scan(mk_cmd(CMD_LOAD, 0), dout);
    end
    for (int s = 0; s < NS; s++) begin
      automatic real p = period_ns(SAMPLE[s]);
      automatic int lo = int'($floor(ref_cnt[s] * 20.0 / p)) - 2;
      automatic real f_meas = real'(ro_cnt[s]) * 50.0 / real'(ref_cnt[s]);
      $display("RO %3d: ro_count %0d ref_count %0d -> %f MHz (model %f MHz)",
               SAMPLE[s], ro_cnt[s], ref_cnt[s], f_meas, 1000.0 / p);
      check(ref_cnt[s] > 600 && ref_cnt[s] < 800, "enable time");
      check(int'(ro_cnt[s]) >= lo && int'(ro_cnt[s]) <= lo + 5, $sformatf("RO %0d count", SAMPLE[s]));
      check(f_meas > 1000.0 / p * 0.998 && f_meas < 1000.0 / p * 1.002, $sformatf("RO %0d frequency", SAMPLE[s]));
    end
    for (int s = 0; s < NS; s += 2) begin
      automatic real pa = period_ns(SAMPLE[s]), pb = period_ns(SAMPLE[s+1]);
      automatic bit r = longint'(ro_cnt[s]) * ref_cnt[s+1] > longint'(ro_cnt[s+1]) * ref_cnt[s];
      if (((pa > pb) ? pa - pb : pb - pa) / pa > 0.002)
        check(r == (pa < pb), $sformatf("response bit of pair %0d/%0d", SAMPLE[s], SAMPLE[s+1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
