// Testbench for ro_mux: random input vectors, every address; the output must
// equal the addressed input bit.
module tb_ro_mux;
  localparam int unsigned N = 512;
  int checks = 0, failures = 0;

  logic [N-1:0]         ro_vec;
  logic [$clog2(N)-1:0] addr;
  logic                 ro_sel;

  ro_mux #(.N(N)) dut (.ro_vec(ro_vec), .addr(addr), .ro_sel(ro_sel));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int w = 0; w < N / 32; w++) ro_vec[w*32 +: 32] = $urandom;
      for (int a = 0; a < N; a++) begin
        addr = a[$clog2(N)-1:0];
        #1;
        checks++;
        if (ro_sel !== ro_vec[a]) begin
          failures++;
          $display("FAIL: addr %0d got %b expected %b", a, ro_sel, ro_vec[a]);
        end
      end
    end
    // one-hot vectors: only the selected position may pass a 1
    for (int a = 0; a < N; a += 37) begin
      ro_vec = '0;
      ro_vec[a] = 1'b1;
      addr = a[$clog2(N)-1:0];
      #1;
      checks++;
      if (ro_sel !== 1'b1) begin failures++; $display("FAIL: one-hot at %0d", a); end
      addr = 9'((a + 1) % N);
      #1;
      checks++;
      if (ro_sel !== 1'b0) begin failures++; $display("FAIL: neighbour of %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
