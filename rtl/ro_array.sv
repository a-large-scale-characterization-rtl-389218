// Behavioural model (not synthesizable, because it holds ring oscillators)
// of the ROWS x COLS ring-oscillator array with its enable decoder and
// output multiplexer.
//
// RO number row*COLS + col is the cell at that row and column. Only the
// addressed RO receives the enable; its output is routed to ro_sel. The
// array size (16 x 32 = 512 identical five-stage ROs, one enabled at a time
// through a decoder and read through a multiplexer) follows the measurement
// setup. The process variation is this design's model: every cell's stage
// delay is STAGE_DELAY_NS * (1 + PV_SPREAD * ro_pv_offset(index)), a fixed
// pseudo-random offset uniform in +-PV_SPREAD (1.3% half-width gives a
// standard deviation of 0.75%).
//
// Interface: addr (RO index), en (enable), ro_sel (selected RO output,
// 1 when stopped). Combinational from addr/en to the cells.
`timescale 1ns/1ps
module ro_array
  import ro_puf_pkg::*;
#(
  parameter int unsigned ROWS           = 16,
  parameter int unsigned COLS           = 32,
  parameter real         STAGE_DELAY_NS = 0.4876,
  parameter real         PV_SPREAD      = 0.013,
  parameter real         NOISE_SIGMA    = 0.00025
) (
  input  logic [$clog2(ROWS*COLS)-1:0] addr,
  input  logic                         en,
  output logic                         ro_sel
);

  localparam int unsigned N = ROWS * COLS;

  logic [N-1:0] en_vec;
  logic [N-1:0] ro_vec;

  ro_decoder #(.N(N)) u_decoder (.addr(addr), .en(en), .en_vec(en_vec));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r * COLS + c;
      ro_cell #(
        .STAGE_DELAY_NS(STAGE_DELAY_NS * (1.0 + PV_SPREAD * ro_pv_offset(IDX))),
        .NOISE_SIGMA   (NOISE_SIGMA)
      ) u_ro (
        .en    (en_vec[IDX]),
        .ro_out(ro_vec[IDX])
      );
    end
  end

  ro_mux #(.N(N)) u_mux (.ro_vec(ro_vec), .addr(addr), .ro_sel(ro_sel));

endmodule
