// Test of decoder16: buses built by the reference encoder from random data
// and random lane enables must decode back to the data of the enabled lanes,
// with disabled lanes reading zero.
module tb_decoder16;
  import xtalk_ref_pkg::*;
  logic [26:0] bus;
  logic [3:0] byte_lane;
  logic [15:0] data;
  int checks = 0, failures = 0;
  decoder16 dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic logic [26:0] prev = 0;
    logic [15:0] d, expd;
    for (int k = 0; k < 20000; k++) begin
      d = 16'($urandom);
      byte_lane = 4'($urandom);
      bus = encode16(d, byte_lane, prev);
      prev = bus;
      expd = d & {{8{byte_lane[1]}}, {8{byte_lane[0]}}};
      #1;
      checks++;
      if (data !== expd) begin
        failures++;
        $display("FAIL k=%0d lanes=%b d=%h got %h", k, byte_lane, d, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
