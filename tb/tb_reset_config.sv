// Self-checking testbench for reset_config.
// A model of each FPGA pulls DONE low while its PROGRAM input is low and
// raises it again a few cycles after PROGRAM is released. The test sends a
// 300 ns hard reset, a 1 us hard reset, VME program requests to single
// FPGAs, and an INIT error. Checks: every prog_n falls 3 clocks after
// hard_reset rises and stays low PROG_CYCLES clocks (longer while hard_reset
// is held), only the requested FPGAs are pulsed by VME, cfg_done drops
// during reconfiguration and returns once all DONE are back, INIT low keeps
// cfg_done low, and the hard-reset counter counts.
module tb_reset_config;
  import ccb_vme_pkg::*;

  localparam int unsigned PROG = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  logic              hard_reset, cfg_done;
  logic [N_FPGA-1:0] reconfig, done, init, prog_n;
  logic [7:0]        reset_count;

  reset_config #(.PROG_CYCLES(PROG)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FPGA model: DONE low while programming and for 5 cycles after
  int busy [N_FPGA];
  int low_len [N_FPGA], last_low [N_FPGA];
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_FPGA; i++) begin
      if (!prog_n[i]) begin
        busy[i] <= 5; done[i] <= 1'b0; low_len[i] <= low_len[i] + 1;
      end else begin
        if (low_len[i] != 0) begin last_low[i] <= low_len[i]; low_len[i] <= 0; end
        if (busy[i] != 0) busy[i] <= busy[i] - 1;
        else done[i] <= 1'b1;
      end
    end
  end

  task automatic hard_pulse(input int ns_len, output int fall_delay);
    int n;
    @(negedge clk);
    hard_reset = 1;
    n = 0;
    fork
      begin #(ns_len) hard_reset = 0; end
      begin
        while (prog_n == '1) begin @(negedge clk); n++; end
      end
    join
    fall_delay = n;
    repeat (40) @(negedge clk);
  endtask

  int dly;

  initial begin
    hard_reset = 0; reconfig = 0; init = '1; done = '1;
    for (int i = 0; i < N_FPGA; i++) begin busy[i] = 0; low_len[i] = 0; last_low[i] = 0; end
    #60 rst_n = 1;
    repeat (10) @(negedge clk);
    check(cfg_done, "cfg_done with all DONE high");

    hard_pulse(300, dly);
    check(dly == 3, $sformatf("prog_n falls 3 clocks after hard reset (%0d)", dly));
    for (int i = 0; i < N_FPGA; i++)
      check(last_low[i] == PROG, $sformatf("FPGA %0d program pulse %0d clocks", i, last_low[i]));
    check(cfg_done, "cfg_done back after reconfiguration");

    hard_pulse(1000, dly);
    for (int i = 0; i < N_FPGA; i++)
      check(last_low[i] >= 40 && last_low[i] <= 42, $sformatf("FPGA %0d held while reset high (%0d)", i, last_low[i]));
    check(reset_count == 2, "hard resets counted");

    // VME request for FPGA 2 only, watching cfg_done drop
    for (int i = 0; i < N_FPGA; i++) last_low[i] = 0;
    @(negedge clk); reconfig = 6'b000100;
    @(negedge clk); reconfig = 0;
    repeat (4) @(negedge clk);
    check(!cfg_done, "cfg_done low during reconfiguration");
    repeat (30) @(negedge clk);
    for (int i = 0; i < N_FPGA; i++)
      check(last_low[i] == ((i == 2) ? PROG : 0), $sformatf("VME request pulses FPGA %0d: %0d", i, last_low[i]));
    check(cfg_done, "cfg_done back");

    // INIT error
    init[4] = 0;
    repeat (4) @(negedge clk);
    check(!cfg_done, "INIT low blocks cfg_done");
    init[4] = 1;
    repeat (4) @(negedge clk);
    check(cfg_done, "cfg_done after INIT recovers");

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
