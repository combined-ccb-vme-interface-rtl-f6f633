// reset_config: hard-reset fan-out and configuration-status collection.
//
// SP_HARD_RESET from the CCB (a 300 ns pulse) makes every Virtex FPGA on the
// board reload its configuration. This block turns it into an active-low
// program pulse, PROG_CYCLES clocks long, to each FPGA; VME can also request
// a program pulse for any subset of the FPGAs (reconfig). It collects the
// FPGAs' DONE and INIT lines and reports SP_CFG_DONE to the CCB: high when
// every FPGA has DONE high, none has INIT low (INIT low after configuration
// flags a configuration error) and no program pulse is in progress.
// The fan-out and the DONE/INIT collection follow the proposal; the pulse
// length, the rule for SP_CFG_DONE and the VME request are this design's
// choices.
//
// Timing: hard_reset and the DONE/INIT lines pass through two-flop
// synchronizers; prog_n falls 3 clocks after hard_reset rises (2 after a
// reconfig pulse) and stays low for PROG_CYCLES clocks or as long as
// hard_reset is held, whichever is longer.
module reset_config
  import ccb_vme_pkg::*;
#(
  parameter int unsigned N           = N_FPGA,
  parameter int unsigned PROG_CYCLES = 12       // 300 ns at 40 MHz
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hard_reset,    // SP_HARD_RESET, active high, asynchronous
  input  logic [N-1:0] reconfig,      // one-cycle requests from VME
  input  logic [N-1:0] done,          // DONE of each FPGA, asynchronous
  input  logic [N-1:0] init,          // INIT of each FPGA, asynchronous
  output logic [N-1:0] prog_n,        // program pulse to each FPGA
  output logic         cfg_done,      // SP_CFG_DONE to the CCB
  output logic [7:0]   reset_count    // hard resets seen (wraps)
);

  localparam int unsigned CW = $clog2(PROG_CYCLES + 1);

  logic [2:0]   hr_sync;
  logic         hr_rise;
  logic [N-1:0] done_s0, done_s1, init_s0, init_s1;
  logic [CW-1:0] cnt [N];

  assign hr_rise = hr_sync[1] & ~hr_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hr_sync     <= '0;
      done_s0     <= '0;
      done_s1     <= '0;
      init_s0     <= '0;
      init_s1     <= '0;
      prog_n      <= '1;
      cfg_done    <= 1'b0;
      reset_count <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      hr_sync <= {hr_sync[1:0], hard_reset};
      done_s0 <= done;
      done_s1 <= done_s0;
      init_s0 <= init;
      init_s1 <= init_s0;
      if (hr_rise) reset_count <= reset_count + 1'b1;
      for (int i = 0; i < N; i++) begin
        if (hr_rise || reconfig[i]) begin
          cnt[i]    <= CW'(PROG_CYCLES - 1);
          prog_n[i] <= 1'b0;
        end else if (cnt[i] != 0) begin
          cnt[i] <= cnt[i] - 1'b1;
        end else begin
          prog_n[i] <= ~hr_sync[1];
        end
      end
      cfg_done <= (&done_s1) && (&init_s1) && (&prog_n);
    end
  end

endmodule
