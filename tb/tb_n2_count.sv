// Exhaustive test of n2_count against a count of adjacent wire pairs that
// switch in opposite directions.
module tb_n2_count;
  import xtalk_ref_pkg::*;
  logic [3:0] x_new, x_old;
  logic [1:0] n2;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  n2_count dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int o = 0; o < 16; o++)
      for (int n = 0; n < 16; n++) begin
        automatic int exp_n = 0;
        x_new = 4'(n); x_old = 4'(o);
        #1;
        for (int i = 0; i < 3; i++)
          if (tr(MAXW'(o), MAXW'(n), i) * tr(MAXW'(o), MAXW'(n), i + 1) == -1) exp_n++;
        checks++;
        seen[exp_n]++;
        if (int'(n2) != exp_n) begin
          failures++;
          $display("FAIL old=%b new=%b n2=%0d expected %0d", x_old, x_new, n2, exp_n);
        end
      end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
