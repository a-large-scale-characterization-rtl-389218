// RO enable decoder: activates a single ring oscillator at a time.
//
// A binary-to-one-hot decoder gated by the global enable: en_vec[addr] is
// high while en is high, every other bit is low, and all are low when en is
// low. Purely combinational. Decoding one RO at a time follows the
// measurement setup; the plain one-hot decoder is this design's choice.
module ro_decoder #(
  parameter int unsigned N = 512
) (
  input  logic [$clog2(N)-1:0] addr,
  input  logic                 en,
  output logic [N-1:0]         en_vec
);

  always_comb begin
    en_vec = '0;
    if (en && (32'(addr) < N)) en_vec[addr] = 1'b1;
  end

endmodule
