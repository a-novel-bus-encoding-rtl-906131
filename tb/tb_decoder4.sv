// Exhaustive test of decoder4: coded ^ 0101 for decode bit 0, ^ 1010 for 1.
module tb_decoder4;
  logic [3:0] coded, data;
  logic dbit;
  int checks = 0, failures = 0;
  decoder4 dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 16; c++) begin
        coded = 4'(c); dbit = s[0];
        #1;
        checks++;
        if (data !== (4'(c) ^ (s ? 4'b1010 : 4'b0101))) begin
          failures++;
          $display("FAIL coded=%b dbit=%0d data=%b", coded, s, data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
