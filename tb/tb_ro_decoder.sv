// Testbench for ro_decoder: every address with the enable high must give
// exactly that one bit set; with the enable low all bits must be low.
module tb_ro_decoder;
  localparam int unsigned N = 512;
  int checks = 0, failures = 0;

  logic [$clog2(N)-1:0] addr;
  logic                 en;
  logic [N-1:0]         en_vec, expected;

  ro_decoder #(.N(N)) dut (.addr(addr), .en(en), .en_vec(en_vec));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      addr = a[$clog2(N)-1:0];
      en = 1'b1;
      #1;
      expected = '0;
      expected[a] = 1'b1;
      checks++;
      if (en_vec !== expected) begin
        failures++;
        $display("FAIL: addr %0d enabled, got popcount %0d", a, $countones(en_vec));
      end
      en = 1'b0;
      #1;
      checks++;
      if (en_vec !== '0) begin
        failures++;
        $display("FAIL: addr %0d disabled, vector not zero", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
