// End-to-end test of the AHB crosstalk codec at its default size.
//
// Six workloads are streamed through the codec, one word per clock:
// uniformly random, image-like and biosignal-like data (see
// xtalk_ref_pkg::gen_sample), each as 8-bit transfers (byte lane 0 only,
// the upper segment grounded) and as 16-bit transfers (lanes 0 and 1).
// Per clock the testbench checks
//   - the coded bus against the reference encoder (exact wire values),
//   - the decoded data, one clock edge after the data was applied,
//   - that no type-4 or type-2 coupling occurs on any window of the 27 wires.
// It counts the mechanisms of the codec and fails if one never occurs:
// the four selection rules of the cluster encoder, a grounded lane, and a
// switch between 8-bit and 16-bit transfers. For each workload it reports
// the crosstalk counts and the bus energy of the coded bus against the same
// data sent uncoded on 8 or 16 adjacent wires (lumped model, lambda = 3.2).
module tb_ahb_xtalk_codec;
  import xtalk_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] hwdata = 0, rdata;
  logic [3:0] byte_lane = 0, bus_lane;
  logic [26:0] bus;
  int checks = 0, failures = 0;
  int rule_hits[1:4] = '{0, 0, 0, 0};
  int ground_cycles = 0, mode_switches = 0;
  ahb_xtalk_codec dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [26:0] exp_bus = 0;
  logic [15:0] raw_prev = 0;

  task automatic run_workload(string name, int kind, int width, int samples);
    real e_enc = 0.0, e_raw = 0.0;
    xt_counts_t tot_enc = '{0, 0, 0, 0}, tot_raw = '{0, 0, 0, 0};
    logic [3:0] lanes = (width == 8) ? 4'b0001 : 4'b0011;
    if (byte_lane[1:0] != 2'b00 && byte_lane != lanes) mode_switches++;
    for (int k = 0; k < samples; k++) begin
      logic [15:0] d;
      logic [26:0] nb;
      logic [3:0] w;
      logic s;
      int r;
      xt_counts_t ce, cr;
      @(negedge clk);
      d = gen_sample(kind, k, width);
      hwdata = (width == 8) ? {8'($urandom), d[7:0]} : d;  // upper byte is don't-care in 8-bit mode
      byte_lane = lanes;
      for (int c = 0; c < 4; c++) begin
        if (lanes[c / 2]) begin
          encode4(hwdata[4*c +: 4], exp_bus[(c / 2) * 14 + (c % 2) * 5 +: 4], w, s, r);
          rule_hits[r]++;
        end
      end
      if (!lanes[1]) ground_cycles++;
      nb = encode16(hwdata, lanes, exp_bus);
      @(posedge clk);
      #1;
      checks++;
      if (bus !== nb) begin
        failures++;
        $display("FAIL %s k=%0d bus=%h expected %h", name, k, bus, nb);
      end
      checks++;
      if (rdata !== (hwdata & ((width == 8) ? 16'h00FF : 16'hFFFF)) || bus_lane !== lanes) begin
        failures++;
        $display("FAIL %s k=%0d rdata=%h hwdata=%h", name, k, rdata, hwdata);
      end
      ce = classify(MAXW'(exp_bus), MAXW'(bus), 27);
      cr = classify(MAXW'(raw_prev), MAXW'(d), width);
      checks++;
      if (ce.n4 != 0 || ce.n2 != 0) begin
        failures++;
        $display("FAIL %s k=%0d worst-case crosstalk on the coded bus", name, k);
      end
      if (k > 0) begin
        e_enc += energy(MAXW'(exp_bus), MAXW'(bus), 27);
        e_raw += energy(MAXW'(raw_prev), MAXW'(d), width);
        tot_enc.n4 += ce.n4; tot_enc.n3 += ce.n3; tot_enc.n2 += ce.n2; tot_enc.n1 += ce.n1;
        tot_raw.n4 += cr.n4; tot_raw.n3 += cr.n3; tot_raw.n2 += cr.n2; tot_raw.n1 += cr.n1;
      end
      exp_bus = bus;
      raw_prev = d;
    end
    $display("%-6s %6d samples: uncoded N4=%0d N3=%0d N2=%0d N1=%0d | coded N4=%0d N3=%0d N2=%0d N1=%0d | energy saving %0.1f%%",
             name, samples, tot_raw.n4, tot_raw.n3, tot_raw.n2, tot_raw.n1,
             tot_enc.n4, tot_enc.n3, tot_enc.n2, tot_enc.n1, 100.0 * (1.0 - e_enc / e_raw));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (bus !== '0 || rdata !== '0) failures++;
    rst_n = 1;
    run_workload("ran8",  0,  8, 10000);
    run_workload("img8",  1,  8, 65535);
    run_workload("bio8",  2,  8, 14644);
    run_workload("ran16", 0, 16, 10000);
    run_workload("img16", 1, 16, 65535);
    run_workload("bio16", 2, 16, 14644);
    run_workload("ran8b", 0,  8, 1000);
    for (int r = 1; r <= 4; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin failures++; $display("FAIL selection rule %0d never used", r); end
    end
    checks++;
    if (ground_cycles == 0) failures++;
    checks++;
    if (mode_switches < 2) failures++;
    $display("selection rules: z1-type4=%0d z2-type4=%0d n2-compare=%0d default=%0d; grounded-lane cycles=%0d; 8/16-bit switches=%0d",
             rule_hits[1], rule_hits[2], rule_hits[3], rule_hits[4], ground_cycles, mode_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
