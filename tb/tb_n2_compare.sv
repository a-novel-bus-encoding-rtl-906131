// Exhaustive test of the 2-bit comparator.
module tb_n2_compare;
  logic [1:0] a, b;
  logic gt;
  int checks = 0, failures = 0;
  n2_compare dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (gt !== (i > j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d gt=%b", i, j, gt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
