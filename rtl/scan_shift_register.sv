// JTAG user data register behind the FPGA's boundary-scan primitive.
//
// It serialises the two counter values towards the host and deserialises the
// host's commands for the FSM. The boundary-scan signals (DRCK, SEL, SHIFT,
// UPDATE, TDI) are brought into the 50 MHz domain through two-flop
// synchronisers, and rising DRCK edges are detected there:
//   - SHIFT-DR: at each rising DRCK edge with SEL and SHIFT high the register
//     shifts right, TDI enters at bit W-1, and bit 0 drives TDO (LSB first).
//   - UPDATE-DR: at the rising edge of UPDATE with SEL high, the first CMD_W
//     bits shifted in (now bits CMD_W-1:0) are presented on cmd with a
//     one-cycle cmd_valid pulse.
//   - load (from the FSM) copies load_data in parallel; it wins over a shift.
// Using a shift register to serialise the data through the boundary-scan
// module follows the measurement setup. The width, the bit order, the command
// path and the oversampling of DRCK are this design's choices. DRCK must run
// at no more than 1/8 of clk so that TDO is updated before the falling DRCK
// edge at which the TAP samples it.
module scan_shift_register
  import ro_puf_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             jtag_drck,
  input  logic             jtag_sel,
  input  logic             jtag_shift,
  input  logic             jtag_update,
  input  logic             jtag_tdi,
  output logic             jtag_tdo,
  input  logic             load,
  input  logic [W-1:0]     load_data,
  output logic             cmd_valid,
  output logic [CMD_W-1:0] cmd
);

  logic [4:0] raw, syn;
  logic       drck_q, update_q;
  logic [W-1:0] sr;

  assign raw = {jtag_drck, jtag_sel, jtag_shift, jtag_update, jtag_tdi};

  sync_2ff #(.W(5)) u_sync (.clk(clk), .d(raw), .q(syn));

  wire drck_s   = syn[4];
  wire sel_s    = syn[3];
  wire shift_s  = syn[2];
  wire update_s = syn[1];
  wire tdi_s    = syn[0];

  wire drck_rise   = drck_s & ~drck_q;
  wire update_rise = update_s & ~update_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      drck_q    <= 1'b0;
      update_q  <= 1'b0;
      sr        <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
    end else begin
      drck_q    <= drck_s;
      update_q  <= update_s;
      cmd_valid <= 1'b0;
      if (load)
        sr <= load_data;
      else if (drck_rise && sel_s && shift_s)
        sr <= {tdi_s, sr[W-1:1]};
      if (update_rise && sel_s) begin
        cmd_valid <= 1'b1;
        cmd       <= sr[CMD_W-1:0];
      end
    end
  end

  assign jtag_tdo = sr[0];

endmodule
