// Simulation model of the host side of the boundary-scan link: it plays the
// TAP controller and the FPGA's boundary-scan primitive as seen from the user
// data register. Task dr_scan shifts W bits in (LSB first) through TDI while
// collecting W bits from TDO (read just before each rising DRCK edge), then
// pulses UPDATE. HALF_NS is half the DRCK period.
`timescale 1ns/1ps
module jtag_host #(
  parameter int unsigned W       = 64,
  parameter real         HALF_NS = 100.0
) (
  output logic drck,
  output logic sel,
  output logic shift,
  output logic update,
  output logic tdi,
  input  logic tdo
);

  initial begin
    drck = 0; sel = 0; shift = 0; update = 0; tdi = 0;
  end

  int unsigned scans = 0;

  task automatic dr_scan(input logic [W-1:0] din, output logic [W-1:0] dout);
    sel   = 1'b1;
    shift = 1'b1;
    #(HALF_NS);
    for (int i = 0; i < W; i++) begin
      tdi = din[i];
      #(HALF_NS);
      dout[i] = tdo;
      drck = 1'b1;
      #(HALF_NS);
      drck = 1'b0;
    end
    shift = 1'b0;
    #(HALF_NS);
    update = 1'b1;
    #(HALF_NS);
    update = 1'b0;
    #(HALF_NS);
    sel = 1'b0;
    scans++;
  endtask

endmodule
