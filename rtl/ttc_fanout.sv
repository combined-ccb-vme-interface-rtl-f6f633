// ttc_fanout: distribution of the CCB timing pulses to every Virtex FPGA.
//
// The CCB sends BX0, BCNTRES, EVCNTRES and L1ACCEPT as single 25 ns pulses
// (one 40 MHz clock) on the backplane. The interface FPGA fans them out to
// each FPGA on the board and, as the proposal asks, combines them with the
// same pulses generated from VME, so that fake L1Accepts and counter resets
// can be produced without a CCB. Each source has an enable (pass_ccb,
// pass_vme) set from VME; the combination is an OR of the enabled sources,
// which is this design's choice.
//
// Timing: the backplane pulses are registered on arrival, merged, and
// registered again in one copy per destination FPGA, so every output is a
// flop (short, equal paths to each FPGA) and follows its input by 2 clocks;
// VME pulses follow by 1 clock.
module ttc_fanout
  import ccb_vme_pkg::*;
#(
  parameter int unsigned N_OUT = N_FPGA
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ttc_pulses_t ccb_in,       // from the backplane receivers
  input  ttc_pulses_t vme_in,       // one-shot pulses from the registers
  input  logic        pass_ccb,
  input  logic        pass_vme,
  output ttc_pulses_t fpga_out [N_OUT],
  output logic [7:0]  l1a_count     // L1Accepts sent (wraps), for monitoring
);

  ttc_pulses_t ccb_q, merged;

  assign merged = (pass_ccb ? ccb_q : '0) | (pass_vme ? vme_in : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccb_q     <= '0;
      l1a_count <= '0;
      for (int i = 0; i < N_OUT; i++) fpga_out[i] <= '0;
    end else begin
      ccb_q <= ccb_in;
      for (int i = 0; i < N_OUT; i++) fpga_out[i] <= merged;
      if (merged.l1accept) l1a_count <= l1a_count + 1'b1;
    end
  end

endmodule
