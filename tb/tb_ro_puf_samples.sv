// Repeated-sample testbench for ro_puf_top: a 2 x 2 array, each RO measured
// K times with a long enable window (the host waits WINDOW_NS between ENABLE
// and DISABLE). From the K frequency samples f'_k = ro_count * 50 / ref_count
// of each RO it computes the mean f and the sample standard deviation sigma
// (divisor K-1), and checks:
//   - the mean frequency against the RO model within 0.05 %,
//   - sigma / f (the dynamic, sample-to-sample variation) is within a factor
//     of two of the model's NOISE_SIGMA, i.e. the measurement resolves noise
//     of this size,
//   - the response bits of the adjacent pairs from the mean frequencies agree
//     with the model's ordering, and per-sample bits flip in at most a few
//     samples (intra-chip Hamming distance against the mean-based reference).
`timescale 1ns/1ps
module tb_ro_puf_samples;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  localparam int  ROWS = 2, COLS = 2, N = ROWS * COLS;
  localparam int  K = 25;
  localparam real WINDOW_NS = 200000.0;      // 10 000 reference cycles
  localparam real D = 0.4876, SPRD = 0.013, NOISE = 0.00025;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic drck, sel, shift, update, tdi, tdo, busy, ro_enable;

  ro_puf_top #(.ROWS(ROWS), .COLS(COLS)) dut (
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
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real fs[N][K];
  real fmean[N], fsig[N];
  logic [63:0] dout;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    host.dr_scan(mk_cmd(CMD_CLEAR, 0), dout);
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) begin
        host.dr_scan(mk_cmd(CMD_ENABLE, i), dout);
        #(WINDOW_NS);
        host.dr_scan(mk_cmd(CMD_DISABLE, 0), dout);
        host.dr_scan(mk_cmd(CMD_LOAD, 0), dout);
        host.dr_scan(mk_cmd(CMD_CLEAR, 0), dout);
        check(dout[63:32] > 10000 && dout[63:32] < 10800, "enable window length");
        fs[i][k] = real'(dout[31:0]) * 50.0 / real'(dout[63:32]);
      end
    end
    for (int i = 0; i < N; i++) begin
      automatic real s = 0.0, q = 0.0, ftrue = 1000.0 / period_ns(i);
      for (int k = 0; k < K; k++) s += fs[i][k];
      fmean[i] = s / K;
      for (int k = 0; k < K; k++) q += (fs[i][k] - fmean[i]) ** 2;
      fsig[i] = $sqrt(q / (K - 1));
      $display("RO %0d: mean %f MHz (model %f), sigma/f = %f %%", i, fmean[i], ftrue,
               100.0 * fsig[i] / fmean[i]);
      check(fmean[i] > ftrue * 0.9995 && fmean[i] < ftrue * 1.0005, $sformatf("RO %0d mean frequency", i));
      check(fsig[i] / fmean[i] > 0.5 * NOISE && fsig[i] / fmean[i] < 2.0 * NOISE,
            $sformatf("RO %0d dynamic variation %f %%", i, 100.0 * fsig[i] / fmean[i]));
    end
    for (int t = 0; t < N - 1; t++) begin
      automatic bit ref_bit = fmean[t] > fmean[t+1];
      automatic int flips = 0;
      check(ref_bit == (period_ns(t) < period_ns(t + 1)), $sformatf("reference bit %0d", t));
      for (int k = 0; k < K; k++) if ((fs[t][k] > fs[t+1][k]) != ref_bit) flips++;
      $display("bit %0d: flipped in %0d of %0d samples", t, flips, K);
      check(flips <= K / 5, $sformatf("bit %0d stable", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
