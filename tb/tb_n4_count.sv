// Exhaustive test of n4_count: every (new, old) pair of 4-bit words is
// compared with a window scan of the type-4 definition.
module tb_n4_count;
  import xtalk_ref_pkg::*;
  logic [3:0] x_new, x_old;
  logic n4;
  int checks = 0, failures = 0, hits = 0;
  n4_count dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int o = 0; o < 16; o++)
      for (int n = 0; n < 16; n++) begin
        xt_counts_t c;
        x_new = 4'(n); x_old = 4'(o);
        #1;
        c = classify(MAXW'(o), MAXW'(n), 4);
        checks++;
        if (n4 !== (c.n4 > 0)) begin
          failures++;
          $display("FAIL old=%b new=%b n4=%b expected %0d", x_old, x_new, n4, c.n4);
        end
        hits += (c.n4 > 0);
      end
    checks++;
    if (hits == 0) failures++;
    $display("type-4 cases seen: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
