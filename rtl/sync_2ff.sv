// Two-flip-flop synchroniser for W independent single-bit signals coming
// from another clock domain (here the JTAG boundary-scan signals). Output is
// the input delayed by two clk cycles; no reset, the chain settles within
// two cycles.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
