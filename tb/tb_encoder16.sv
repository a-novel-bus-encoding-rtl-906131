// Test of encoder16: random data with random byte lane enables (lane 0 only,
// lane 1 only, both, none). The 27-wire bus is compared with the reference
// encoder, which grounds disabled lanes; lane_q must follow byte_lane by one
// clock edge.
module tb_encoder16;
  import xtalk_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] data = 0;
  logic [3:0] byte_lane = 0, lane_q;
  logic [26:0] bus;
  int checks = 0, failures = 0;
  int lane_mode_seen[4] = '{0, 0, 0, 0};
  encoder16 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic logic [26:0] exp_bus = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (bus !== '0 || lane_q !== '0) failures++;
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      data = 16'($urandom);
      if (k % 16 == 0) byte_lane = 4'($urandom);
      exp_bus = encode16(data, byte_lane, exp_bus);
      @(posedge clk);
      #1;
      lane_mode_seen[byte_lane[1:0]]++;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL k=%0d data=%h lanes=%b got %h exp %h", k, data, byte_lane, bus, exp_bus);
      end
      checks++;
      if (lane_q !== byte_lane) failures++;
    end
    foreach (lane_mode_seen[i]) begin
      checks++;
      if (lane_mode_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
