// Self-checking testbench for ttc_fanout.
// Random CCB and VME pulse patterns, with the two source enables changed
// every 50 cycles, are compared with a reference pipeline: each output copy
// must equal (pass_ccb ? CCB pulses two cycles earlier : 0) OR
// (pass_vme ? VME pulses one cycle earlier : 0). The L1Accept counter is
// compared with a count of expected L1Accepts.
module tb_ttc_fanout;
  import ccb_vme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  ttc_pulses_t ccb_in, vme_in;
  logic        pass_ccb, pass_vme;
  ttc_pulses_t fpga_out [N_FPGA];
  logic [7:0]  l1a_count;

  ttc_fanout dut (.*);

  int checks = 0, failures = 0;
  ttc_pulses_t ccb_d1, ccb_d2, vme_d1, expected;
  logic pc_d1, pv_d1;
  int n_l1a = 0;

  initial begin
    ccb_in = '0; vme_in = '0; pass_ccb = 1; pass_vme = 1;
    ccb_d1 = '0; ccb_d2 = '0; vme_d1 = '0; pc_d1 = 1; pv_d1 = 1;
    #60 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // outputs now reflect the inputs applied at the last two negedges
      expected = (pc_d1 ? ccb_d2 : '0) | (pv_d1 ? vme_d1 : '0);
      begin
        for (int i = 0; i < N_FPGA; i++) begin
          checks++;
          if (fpga_out[i] != expected) begin
            failures++;
            $display("FAIL: cycle %0d out %0d %b expected %b", cyc, i, fpga_out[i], expected);
          end
        end
        if (expected.l1accept) n_l1a++;
      end
      if (cyc % 50 == 0) begin pass_ccb = 1'($urandom); pass_vme = 1'($urandom); end
      pc_d1 = pass_ccb; pv_d1 = pass_vme;
      ccb_in = ttc_pulses_t'($urandom) & ttc_pulses_t'($urandom);
      vme_in = ttc_pulses_t'($urandom) & ttc_pulses_t'($urandom) & ttc_pulses_t'($urandom);
      ccb_d2 = ccb_d1; ccb_d1 = ccb_in; vme_d1 = vme_in;
    end
    checks++;
    if (l1a_count != 8'(n_l1a)) begin
      failures++;
      $display("FAIL: l1a_count %0d expected %0d", l1a_count, 8'(n_l1a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
