// Behavioural model (not synthesizable) of one five-stage ring oscillator.
//
// The loop is a 2-input NAND, whose second input is the enable, followed by
// four inverters; the fourth inverter's output feeds the NAND and is the
// cell's output. This structure is the one the measurement setup uses. Each
// stage is a process with a transport delay (non-blocking assignment after
// the stage delay), so the loop oscillates with period 10 * stage delay when
// en is high and rests at 1 when en is low. When en falls, the wave still in
// the ring finishes, so a stopped ring gives one last rising edge as it
// returns to 1.
//
// Timing model (this design's own): STAGE_DELAY_NS carries the average delay
// and the static process-variation term of the RO. The dynamic noise term is
// a relative offset drawn once at each rising edge of en, uniform with a
// standard deviation of NOISE_SIGMA, and applied to all five stages during
// that enable period. The default 0.4876 ns per stage gives 205.1 MHz.
//
// Interface: en (enable), ro_out (oscillator output). No clock, no reset.
`timescale 1ns/1fs
module ro_cell #(
  parameter real STAGE_DELAY_NS = 0.4876,
  parameter real NOISE_SIGMA    = 0.00025
) (
  input  logic en,
  output logic ro_out
);

  logic [4:0] stage;     // stage[0]: NAND output, stage[4]: last inverter
  realtime    dly;

  initial dly = STAGE_DELAY_NS;

  // New noise sample per enable period; uniform on [-sqrt(3), sqrt(3)) * sigma.
  always @(posedge en) begin
    dly <= STAGE_DELAY_NS *
          (1.0 + NOISE_SIGMA * 1.7320508 * ((real'($urandom % 65536) / 32768.0) - 1.0));
  end

  // Rest state of a stopped ring: NAND output 1, then 0/1/0/1.
  initial stage = 5'b10101;

  always @(en or stage[4]) stage[0] <= #(dly) ~(en & stage[4]);
  always @(stage[0])       stage[1] <= #(dly) ~stage[0];
  always @(stage[1])       stage[2] <= #(dly) ~stage[1];
  always @(stage[2])       stage[3] <= #(dly) ~stage[2];
  always @(stage[3])       stage[4] <= #(dly) ~stage[3];

  assign ro_out = stage[4];

endmodule
