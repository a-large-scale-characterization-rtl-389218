// End-to-end testbench for ro_puf_top with a reduced 4 x 8 array (32 ROs;
// the full 16 x 32 array is exercised by tb_ro_puf_full). It plays the host: over the boundary-scan link
// it sends, for every RO, CLEAR, ENABLE(addr), DISABLE and LOAD, and reads
// {reference count, RO count} back in the scan that carries the next command.
// Checks:
//   - each RO count against the count predicted from that RO's delay
//     STAGE_DELAY_NS * (1 + PV_SPREAD * ro_pv_offset(addr)) and the measured
//     enable time ref_count * 20 ns,
//   - the calibrated frequency ro_count * 50 / ref_count MHz against 1/period,
//   - the 511-bit response from adjacent pairs (bit t = 1 if RO t is faster
//     than RO t+1) against the ordering of the true periods, wherever the two
//     periods differ by more than the measurement resolution,
//   - a second pass over the first 16 ROs: the re-measured response bits
//     (intra-die Hamming distance) must agree with the first pass,
//   - that every mechanism happened: counter clear, enable, disable, load,
//     busy, and a command ignored because it arrived in the wrong state.
`timescale 1ns/1ps
module tb_ro_puf_top;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned ROWS  = 4, COLS = 8;
  localparam int unsigned N     = ROWS * COLS;
  localparam real         D     = 0.4876;   // top default stage delay
  localparam real         SPRD  = 0.013;    // top default PV_SPREAD

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;                    // 50 MHz reference

  logic drck, sel, shift, update, tdi, tdo, busy, ro_enable;

  ro_puf_top #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst), .jtag_drck(drck), .jtag_sel(sel), .jtag_shift(shift),
    .jtag_update(update), .jtag_tdi(tdi), .jtag_tdo(tdo), .busy(busy), .ro_enable(ro_enable));

  jtag_host #(.W(64), .HALF_NS(100.0)) host (
    .drck(drck), .sel(sel), .shift(shift), .update(update), .tdi(tdi), .tdo(tdo));

  // ---- mechanism counters (observed on the design's internal strobes)
  int n_clear = 0, n_enable = 0, n_disable = 0, n_load = 0, n_busy = 0, n_ignored = 0;
  logic clr_q = 0, en_q = 0, busy_q = 0;
  always @(posedge clk) begin
    if (dut.cnt_clr && !clr_q) n_clear++;
    if (ro_enable && !en_q)    n_enable++;
    if (!ro_enable && en_q)    n_disable++;
    if (busy && !busy_q)       n_busy++;
    if (dut.sr_load)           n_load++;
    clr_q <= dut.cnt_clr; en_q <= ro_enable; busy_q <= busy;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
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
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ro_cnt[N], ref_cnt[N];
  logic [63:0] dout;

  // Measure ROs first..last; the counts of RO i come back during the CLEAR
  // scan of RO i+1 (or a final NOP scan).
  task automatic measure(input int first, input int last);
    for (int i = first; i <= last + 1; i++) begin
      host.dr_scan(i <= last ? mk_cmd(CMD_CLEAR, 0) : mk_cmd(CMD_NOP, 0), dout);
      if (i > first) begin
        ro_cnt[i-1]  = dout[31:0];
        ref_cnt[i-1] = dout[63:32];
      end
      if (i > last) break;
      host.dr_scan(mk_cmd(CMD_ENABLE, i), dout);
      host.dr_scan(mk_cmd(CMD_DISABLE, 0), dout);
      host.dr_scan(mk_cmd(CMD_LOAD, 0), dout);
    end
  endtask

  function automatic bit faster(input int a, input int b);  // f_a > f_b
    return longint'(ro_cnt[a]) * ref_cnt[b] > longint'(ro_cnt[b]) * ref_cnt[a];
  endfunction

  logic [N-2:0] key, key2;
  int clear_pairs, hw, hd, unsure;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);

    // ---- one command in the wrong state: LOAD while the RO runs is ignored
    host.dr_scan(mk_cmd(CMD_CLEAR, 0), dout);
    host.dr_scan(mk_cmd(CMD_ENABLE, 7), dout);
    begin
      static int loads_before;
      loads_before = n_load;
      host.dr_scan(mk_cmd(CMD_LOAD, 0), dout);
      check(n_load == loads_before && ro_enable, "LOAD ignored while running");
      if (n_load == loads_before) n_ignored++;
    end
    host.dr_scan(mk_cmd(CMD_DISABLE, 0), dout);

    // ---- full array
    measure(0, N - 1);
    for (int i = 0; i < N; i++) begin
      automatic real p = period_ns(i);
      automatic real t_en = ref_cnt[i] * 20.0;
      automatic int lo = int'($floor(t_en / p)) - 2;
      automatic real f_meas = real'(ro_cnt[i]) * 50.0 / real'(ref_cnt[i]);
      check(ref_cnt[i] > 600 && ref_cnt[i] < 800, $sformatf("RO %0d: enable time %0d cycles", i, ref_cnt[i]));
      check(int'(ro_cnt[i]) >= lo && int'(ro_cnt[i]) <= lo + 5,
            $sformatf("RO %0d: count %0d, expected about %0d", i, ro_cnt[i], lo + 2));
      check(f_meas > 1000.0 / p * 0.998 && f_meas < 1000.0 / p * 1.002,
            $sformatf("RO %0d: %f MHz, true %f MHz", i, f_meas, 1000.0 / p));
    end

    // ---- response: adjacent pairs
    clear_pairs = 0; hw = 0; unsure = 0;
    for (int t = 0; t < N - 1; t++) begin
      automatic real pa = period_ns(t), pb = period_ns(t + 1);
      key[t] = faster(t, t + 1);
      hw += key[t];
      if (((pa > pb) ? pa - pb : pb - pa) / pa > 0.002) begin
        clear_pairs++;
        check(key[t] == (pa < pb), $sformatf("response bit %0d", t));
      end else unsure++;
    end
    $display("key: Hamming weight %0d of %0d bits (%0.2f %%), %0d bits close to the resolution",
             hw, N - 1, 100.0 * hw / (N - 1), unsure);
    check(hw > (N - 1) / 4 && hw < 3 * (N - 1) / 4, "key Hamming weight near one half");

    // ---- second sample of the first 64 ROs: intra-die Hamming distance
    measure(0, 15);
    hd = 0;
    for (int t = 0; t < 15; t++) begin
      key2[t] = faster(t, t + 1);
      if (key2[t] != key[t]) hd++;
    end
    $display("second sample, 15 bits: intra-die Hamming distance %0d", hd);
    check(hd <= 2, $sformatf("intra-die Hamming distance %0d of 15", hd));

    // ---- every mechanism happened at least once
    $display("mechanisms: clear %0d, enable %0d, disable %0d, load %0d, busy %0d, ignored %0d, scans %0d",
             n_clear, n_enable, n_disable, n_load, n_busy, n_ignored, host.scans);
    check(n_clear > 0,   "counter clear happened");
    check(n_enable > 0,  "RO enable happened");
    check(n_disable > 0, "RO disable happened");
    check(n_load > 0,    "shift-register load happened");
    check(n_busy > 0,    "busy happened");
    check(n_ignored > 0, "ignored command happened");
    check(n_load == N + 16, $sformatf("one load per measurement, got %0d", n_load));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
