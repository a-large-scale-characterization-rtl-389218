// Testbench for measure_fsm: issues CLEAR, ENABLE, DISABLE and LOAD commands
// and checks the cycle-exact behaviour: cnt_clr high for CLEAR_CYCLES
// cycles, address latched one cycle before ro_en rises, ro_en held until
// DISABLE, busy during the settle time, a single sr_load pulse, and that
// commands arriving in the wrong state are ignored.
`timescale 1ns/1ps
module tb_measure_fsm;
  import ro_puf_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned CLEAR_CYCLES = 2, SETTLE_CYCLES = 4;

  logic clk = 0, rst;
  always #10 clk = ~clk;

  logic             cmd_valid;
  cmd_t             c;
  logic [ADDR_W-1:0] ro_addr;
  logic ro_en, cnt_clr, sr_load, busy;

  measure_fsm #(.CLEAR_CYCLES(CLEAR_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) dut (
    .clk(clk), .rst(rst), .cmd_valid(cmd_valid), .cmd(c), .ro_addr(ro_addr),
    .ro_en(ro_en), .cnt_clr(cnt_clr), .sr_load(sr_load), .busy(busy));

  int clr_cycles = 0, load_pulses = 0, en_cycles = 0;
  always @(posedge clk) begin
    if (cnt_clr) clr_cycles++;
    if (sr_load) load_pulses++;
    if (ro_en)   en_cycles++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input cmd_op_e op, input int addr);
    @(negedge clk);
    c.op = op; c.addr = ADDR_W'(addr); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; c = '0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run_len;

  initial begin
    rst = 1; cmd_valid = 0; c = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(!ro_en && !cnt_clr && !sr_load && !busy, "idle after reset");
    for (int k = 0; k < 20; k++) begin
      int a = $urandom % 512;
      run_len = 3 + ($urandom % 40);
      // CLEAR
      clr_cycles = 0;
      send(CMD_CLEAR, 0);
      check(cnt_clr && busy, "clear active right after CLEAR");
      repeat (CLEAR_CYCLES + 2) @(negedge clk);
      check(clr_cycles == CLEAR_CYCLES, $sformatf("clear lasts %0d cycles, got %0d", CLEAR_CYCLES, clr_cycles));
      check(!cnt_clr && !busy, "clear released");
      // ENABLE: address first, enable one cycle later
      en_cycles = 0;
      send(CMD_ENABLE, a);
      check(ro_addr == ADDR_W'(a) && !ro_en, "address latched before enable");
      @(negedge clk);
      check(ro_en && !busy, "RO enabled one cycle after the address");
      // commands other than DISABLE are ignored while running
      send(CMD_CLEAR, 0);
      send(CMD_ENABLE, (a + 1) % 512);
      send(CMD_LOAD, 0);
      check(ro_en && !cnt_clr && ro_addr == ADDR_W'(a), "other commands ignored while running");
      repeat (run_len) @(negedge clk);
      send(CMD_DISABLE, 0);
      check(!ro_en && busy, "RO disabled and settling");
      check(en_cycles == run_len + 8, $sformatf("enable lasted %0d cycles, expected %0d", en_cycles, run_len + 8));
      // a LOAD during the settle time is ignored
      load_pulses = 0;
      send(CMD_LOAD, 0);
      repeat (SETTLE_CYCLES) @(negedge clk);
      check(!busy, "settle done");
      check(load_pulses == 0, "LOAD ignored while settling");
      send(CMD_LOAD, 0);
      @(negedge clk);
      check(load_pulses == 1, $sformatf("one load pulse, got %0d", load_pulses));
      // DISABLE in idle changes nothing
      send(CMD_DISABLE, 0);
      check(!ro_en && !busy, "DISABLE ignored in idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
