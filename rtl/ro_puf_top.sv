// Ring-oscillator frequency measurement system (the hardware of an RO-PUF
// characterisation setup).
//
// A host reaches the design through the FPGA's boundary-scan primitive, whose
// user data register signals are this module's jtag_* ports. The host shifts
// in commands; measure_fsm clears the two counters, enables one ring
// oscillator of the ROWS x COLS array, disables it after a period the host
// chooses, and loads {reference count, RO count} into the scan register,
// which the host shifts out on the next scan. The host computes the RO
// frequency as ro_count * 50 MHz / ref_count.
//
// Data path: measure_fsm -> ro_array (decoder, cells, multiplexer) ->
// ro_counter (clocked by the selected RO); ref_counter counts clk while the
// RO is enabled; both counts -> scan_shift_register -> jtag_tdo.
// Structure and sizes (512 ROs in 16 x 32, two 32-bit counters, a 50 MHz
// reference, a shift register behind boundary scan, a host-driven FSM) follow
// the measurement setup; command format, synchronisation and timing details
// are this design's own (see the sub-modules). Because ro_array models ring
// oscillators behaviourally, this top is a simulation model as a whole; all
// other modules are synthesizable.
//
// clk: 50 MHz; rst: synchronous, active high. DRCK must be <= clk/8.
// cnt_clr is used as a synchronous clear in ref_counter and as an
// asynchronous clear in ro_counter, whose clock (the RO) is stopped while the
// counters are cleared; lint flags this mixed use, and it is intended.
`timescale 1ns/1ps
module ro_puf_top
  import ro_puf_pkg::*;
#(
  parameter int unsigned ROWS           = 16,
  parameter int unsigned COLS           = 32,
  parameter int unsigned CNT_W          = 32,
  parameter real         STAGE_DELAY_NS = 0.4876,
  parameter real         PV_SPREAD      = 0.013,
  parameter real         NOISE_SIGMA    = 0.00025,
  parameter int unsigned CLEAR_CYCLES   = 2,
  parameter int unsigned SETTLE_CYCLES  = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic jtag_drck,
  input  logic jtag_sel,
  input  logic jtag_shift,
  input  logic jtag_update,
  input  logic jtag_tdi,
  output logic jtag_tdo,
  output logic busy,
  output logic ro_enable
);

  localparam int unsigned N  = ROWS * COLS;
  localparam int unsigned AW = $clog2(N);

  logic              cmd_valid;
  logic [CMD_W-1:0]  cmd;
  logic [ADDR_W-1:0] ro_addr;
  logic              ro_en, cnt_clr, sr_load;
  logic              ro_sel;
  logic [CNT_W-1:0]  ro_count, ref_count;

  measure_fsm #(
    .CLEAR_CYCLES (CLEAR_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_fsm (
    .clk(clk), .rst(rst), .cmd_valid(cmd_valid), .cmd(cmd),
    .ro_addr(ro_addr), .ro_en(ro_en), .cnt_clr(cnt_clr), .sr_load(sr_load), .busy(busy)
  );

  ro_array #(
    .ROWS(ROWS), .COLS(COLS), .STAGE_DELAY_NS(STAGE_DELAY_NS),
    .PV_SPREAD(PV_SPREAD), .NOISE_SIGMA(NOISE_SIGMA)
  ) u_array (
    .addr(ro_addr[AW-1:0]), .en(ro_en), .ro_sel(ro_sel)
  );

  ro_counter #(.W(CNT_W)) u_ro_cnt (.ro_clk(ro_sel), .clr(cnt_clr), .count(ro_count));

  ref_counter #(.W(CNT_W)) u_ref_cnt (.clk(clk), .clr(cnt_clr), .en(ro_en), .count(ref_count));

  scan_shift_register #(.W(2 * CNT_W)) u_sr (
    .clk(clk), .rst(rst),
    .jtag_drck(jtag_drck), .jtag_sel(jtag_sel), .jtag_shift(jtag_shift),
    .jtag_update(jtag_update), .jtag_tdi(jtag_tdi), .jtag_tdo(jtag_tdo),
    .load(sr_load), .load_data({ref_count, ro_count}),
    .cmd_valid(cmd_valid), .cmd(cmd)
  );

  assign ro_enable = ro_en;

endmodule
