// Oscillation counter: a W-bit counter clocked by the selected ring
// oscillator's output, incremented on every rising edge of it.
//
// The clear is asynchronous (this design's choice): the RO clock is stopped
// whenever the counters are cleared, so a synchronous clear would never take
// effect. clr comes from a flip-flop in the 50 MHz domain and is released
// before the RO is enabled. count is read by the 50 MHz domain only after the
// RO has stopped, so it is static when sampled. The 32-bit width follows the
// measurement setup.
module ro_counter #(
  parameter int unsigned W = 32
) (
  input  logic         ro_clk,
  input  logic         clr,
  output logic [W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
