// Exhaustive test of decoder8 over both coded clusters and the four
// decode codes of Table 1; shield wires are driven with random values,
// which must not matter.
module tb_decoder8;
  logic [12:0] bus;
  logic [7:0] data;
  int checks = 0, failures = 0;
  decoder8 dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [2:0] codes [4] = '{3'b000, 3'b001, 3'b011, 3'b111};
    logic [3:0] z0 [4] = '{4'b0101, 4'b0101, 4'b1010, 4'b1010};  // first cluster
    logic [3:0] z1 [4] = '{4'b0101, 4'b1010, 4'b0101, 4'b1010};  // second cluster
    for (int k = 0; k < 4; k++)
      for (int v = 0; v < 256; v++) begin
        bus = {codes[k], 1'($urandom), v[7:4], 1'($urandom), v[3:0]};
        #1;
        checks++;
        if (data !== {v[7:4] ^ z1[k], v[3:0] ^ z0[k]}) begin
          failures++;
          $display("FAIL bus=%b data=%h", bus, data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
