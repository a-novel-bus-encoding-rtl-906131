// Test of encoder8: random and correlated bytes with occasional grounding.
// The 13-wire output is compared with two reference cluster encoders, the
// Table-1 decode code and grounded shields, and the whole 13-wire segment
// is checked to be free of type-4 and type-2 couplings. Latency: one edge.
module tb_encoder8;
  import xtalk_ref_pkg::*;
  logic clk = 0, rst_n = 0, ground = 0;
  logic [7:0] data = 0;
  logic [12:0] bus;
  int checks = 0, failures = 0, grounded = 0;
  int info_seen[8];
  encoder8 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic logic [12:0] exp_bus = 0;
    logic [3:0] w0, w1;
    logic s0, s1;
    int r0, r1;
    xt_counts_t c;
    foreach (info_seen[i]) info_seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      data = (k < 10000) ? 8'($urandom) : 8'(gen_sample(2, k, 8));
      ground = ($urandom_range(0, 49) == 0);
      encode4(data[3:0], exp_bus[3:0], w0, s0, r0);
      encode4(data[7:4], exp_bus[8:5], w1, s1, r1);
      @(posedge clk);
      #1;
      c = classify(MAXW'(exp_bus), MAXW'(bus), 13);
      if (ground) begin
        grounded++;
        exp_bus = '0;
      end else begin
        exp_bus = {info3(s0, s1), 1'b0, w1, 1'b0, w0};
        info_seen[bus[12:10]]++;
      end
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL k=%0d data=%h got %b exp %b", k, data, bus, exp_bus);
      end
      checks++;
      if (c.n4 != 0 || c.n2 != 0) failures++;
    end
    foreach (info_seen[i]) begin
      checks++;
      if ((i == 0 || i == 1 || i == 3 || i == 7) != (info_seen[i] > 0)) begin
        failures++;
        $display("FAIL decode code %b seen %0d times", 3'(i), info_seen[i]);
      end
    end
    checks++;
    if (grounded == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
