// Test of encoder4: a random and a correlated data stream, with the ground
// input pulsed now and then. Each registered output is compared with the
// reference encoder run on the previous expected bus state, checked to
// appear exactly one clock edge after its data, checked to decode back to
// the data, and checked to carry no type-4 or type-2 coupling. Every
// selection rule must fire at least once.
module tb_encoder4;
  import xtalk_ref_pkg::*;
  logic clk = 0, rst_n = 0, ground = 0, dbit;
  logic [3:0] data = 0, coded;
  int checks = 0, failures = 0;
  int rule_hits[1:4] = '{0, 0, 0, 0};
  int ground_hits = 0;
  encoder4 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic logic [3:0] exp_word = 0, w;
    automatic logic exp_sel = 0, s;
    int rule;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (coded !== 4'b0 || dbit !== 1'b0) failures++;
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      data = (k < 10000) ? 4'($urandom) : 4'(gen_sample(1, k, 8) >> 4);
      ground = ($urandom_range(0, 49) == 0);
      encode4(data, exp_word, w, s, rule);
      @(posedge clk);
      #1;
      if (ground) begin
        ground_hits++;
        w = 0; s = 0;
      end else rule_hits[rule]++;
      checks++;
      if (coded !== w || dbit !== s) begin
        failures++;
        $display("FAIL k=%0d d=%b prev=%b got %b/%b exp %b/%b", k, data, exp_word, coded, dbit, w, s);
      end
      if (!ground) begin
        automatic xt_counts_t c = classify(MAXW'(exp_word), MAXW'(coded), 4);
        checks++;
        if ((coded ^ (dbit ? 4'b1010 : 4'b0101)) !== data) failures++;
        checks++;
        if (c.n4 != 0 || c.n2 != 0) begin
          failures++;
          $display("FAIL worst-case crosstalk k=%0d %b -> %b", k, exp_word, coded);
        end
      end
      exp_word = w; exp_sel = s;
    end
    for (int r = 1; r <= 4; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin failures++; $display("FAIL rule %0d never fired", r); end
    end
    checks++;
    if (ground_hits == 0) failures++;
    $display("rule hits: z1-type4=%0d z2-type4=%0d n2-compare=%0d default=%0d ground=%0d",
             rule_hits[1], rule_hits[2], rule_hits[3], rule_hits[4], ground_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
