// RO output multiplexer: passes the output of the addressed ring oscillator
// on to the RO counter's clock input.
//
// Purely combinational N:1 selection; an address beyond N-1 gives 1, the
// idle level of a stopped RO, so no spurious clock edge can arise. The
// multiplexer follows the measurement setup; its insides are this design's.
module ro_mux #(
  parameter int unsigned N = 512
) (
  input  logic [N-1:0]         ro_vec,
  input  logic [$clog2(N)-1:0] addr,
  output logic                 ro_sel
);

  always_comb begin
    if (32'(addr) < N) ro_sel = ro_vec[addr];
    else               ro_sel = 1'b1;
  end

endmodule
