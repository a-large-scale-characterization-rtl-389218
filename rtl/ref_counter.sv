// Reference counter: counts periods of the 50 MHz crystal clock while the RO
// enable is high, so that the RO frequency can be calibrated as
// f_RO = ro_count * 50 MHz / ref_count.
//
// W-bit counter with a synchronous clear (clear wins over counting); it
// counts one per clock cycle in which en is high. The 32-bit width and the
// counting during the enable follow the measurement setup; the synchronous
// clear is this design's choice.
module ref_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (clr)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
