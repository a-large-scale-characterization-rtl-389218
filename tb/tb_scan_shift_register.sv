// Testbench for scan_shift_register: loads random parallel data and shifts it
// out over the boundary-scan signals while shifting new data in, checks the
// bits read from TDO, and checks the command word and its one-cycle strobe at
// UPDATE. Also checks that SEL low blocks both shifting and updates.
`timescale 1ns/1ps
module tb_scan_shift_register;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  always #10 clk = ~clk;

  logic drck, sel, shift, update, tdi, tdo;
  logic load;
  logic [63:0] load_data;
  logic cmd_valid;
  logic [CMD_W-1:0] cmd;

  scan_shift_register #(.W(64)) dut (
    .clk(clk), .rst(rst), .jtag_drck(drck), .jtag_sel(sel), .jtag_shift(shift),
    .jtag_update(update), .jtag_tdi(tdi), .jtag_tdo(tdo), .load(load),
    .load_data(load_data), .cmd_valid(cmd_valid), .cmd(cmd));

  jtag_host #(.W(64), .HALF_NS(100.0)) host (
    .drck(drck), .sel(sel), .shift(shift), .update(update), .tdi(tdi), .tdo(tdo));

  int valid_pulses = 0;
  logic [CMD_W-1:0] last_cmd;
  always @(posedge clk) if (cmd_valid) begin valid_pulses++; last_cmd = cmd; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] din, dout, prev_in;

  initial begin
    rst = 1; load = 0; load_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    prev_in = '0;
    for (int k = 0; k < 8; k++) begin
      // parallel load
      load_data = {$urandom, $urandom};
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      din = {$urandom, $urandom};
      valid_pulses = 0;
      host.dr_scan(din, dout);
      repeat (6) @(posedge clk);
      check(dout == load_data, $sformatf("scan %0d out %h expected %h", k, dout, load_data));
      check(valid_pulses == 1, $sformatf("one cmd_valid pulse per update, got %0d", valid_pulses));
      check(last_cmd == din[CMD_W-1:0], $sformatf("cmd %h expected %h", last_cmd, din[CMD_W-1:0]));
      prev_in = din;
    end
    // a scan without a load returns what the previous scan shifted in
    din = {$urandom, $urandom};
    host.dr_scan(din, dout);
    check(dout == prev_in, "data shifted in comes back on the next scan");
    // SEL low: no shifting, no update
    valid_pulses = 0;
    @(negedge clk);
    force sel = 1'b0;
    host.dr_scan({$urandom, $urandom}, dout);
    release sel;
    repeat (6) @(posedge clk);
    check(valid_pulses == 0, "no update without SEL");
    host.dr_scan('0, dout);
    check(dout == din, "register unchanged by a scan without SEL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
