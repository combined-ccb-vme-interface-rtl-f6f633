// Self-checking testbench for clock_switch.
// The oscillator runs at 40 MHz (25 ns); the CCB clock at 24 ns period with
// an offset phase. A monitor measures every high and low phase of clk_sys
// and flags any shorter than 11.9 ns (a runt pulse). Scenarios: start-up on
// the CCB clock; CCB clock stopped low and later stopped high (loss flagged
// within LOSS_CYCLES + 5 oscillator cycles, clk_sys continues on the
// oscillator); CCB clock restarted (taken back after RECOVER_EDGES edges);
// VME force to the oscillator and release. In each steady state clk_sys is
// compared with the clock it should follow.
module tb_clock_switch;

  localparam int unsigned LOSS = 8;
  localparam int unsigned RECOVER = 16;

  logic clk_osc = 1'b0, clk_ccb = 1'b0, rst_n = 1'b0, force_osc = 1'b0;
  logic clk_sys, clk_lost, clk_on_osc;
  bit   ccb_run = 1'b1;
  logic ccb_stop_level = 1'b0;

  always #12.5 clk_osc = ~clk_osc;
  initial begin
    #7;
    forever begin
      #12;
      if (ccb_run) clk_ccb = ~clk_ccb;
      else         clk_ccb = ccb_stop_level;
    end
  end

  clock_switch #(.LOSS_CYCLES(LOSS), .RECOVER_EDGES(RECOVER)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // runt-pulse monitor
  realtime t_last = 0;
  int runts = 0, sys_edges = 0;
  always @(clk_sys) begin
    if (rst_n && $realtime - t_last < 11.9) begin
      runts++;
      $display("runt: %0.1f ns phase ending at %0t", $realtime - t_last, $time);
    end
    t_last = $realtime;
    if (clk_sys) sys_edges++;
  end

  // compare clk_sys with a reference clock over n samples
  task automatic follows(input bit osc, input string what);
    int bad = 0;
    repeat (200) begin
      #1.3;
      if (clk_sys !== (osc ? clk_osc : clk_ccb)) begin
        #0.05;                               // ignore samples on an edge
        if (clk_sys !== (osc ? clk_osc : clk_ccb)) bad++;
      end
    end
    check(bad == 0, $sformatf("clk_sys follows %s (%0d mismatches)", what, bad));
  endtask

  task automatic wait_lost(output int n);
    n = 0;
    while (!clk_lost && n < 100) begin @(posedge clk_osc); n++; end
  endtask

  int n;

  initial begin
    #100 rst_n = 1'b1;
    #500;
    check(!clk_lost && !clk_on_osc, "start-up on the CCB clock");
    follows(0, "CCB clock");

    // stop low
    ccb_run = 0; ccb_stop_level = 0;
    wait_lost(n);
    check(clk_lost && n <= LOSS + 5, $sformatf("loss (stopped low) detected after %0d cycles", n));
    #300;
    check(clk_on_osc, "switched to the oscillator");
    follows(1, "oscillator");

    // restart, recover
    ccb_run = 1;
    #((RECOVER + 20) * 24);
    check(!clk_lost && !clk_on_osc, "CCB clock taken back");
    follows(0, "CCB clock again");

    // stop high
    @(posedge clk_ccb); ccb_run = 0; ccb_stop_level = 1;
    wait_lost(n);
    check(clk_lost && n <= LOSS + 5, $sformatf("loss (stopped high) detected after %0d cycles", n));
    #300;
    follows(1, "oscillator after stuck-high CCB clock");
    ccb_run = 1;
    #((RECOVER + 20) * 24);
    check(!clk_on_osc, "back on the CCB clock");

    // VME force
    force_osc = 1;
    #300;
    check(clk_on_osc && !clk_lost, "forced to the oscillator");
    follows(1, "oscillator (forced)");
    force_osc = 0;
    #300;
    check(!clk_on_osc, "force released");
    follows(0, "CCB clock after force");

    check(runts == 0, $sformatf("no runt pulses on clk_sys (%0d)", runts));
    check(sys_edges > 150, "clk_sys kept running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk_osc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
