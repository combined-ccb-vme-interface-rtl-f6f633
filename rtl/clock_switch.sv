// clock_switch: CCB clock-loss detection and glitch-free switch-over to the
// on-board oscillator.
//
// The system clock of the board normally is the 40 MHz CCB clock. So that the
// board keeps working (and can be debugged) without the CCB, this block
// watches the CCB clock with the on-board 40 MHz oscillator and, when the
// CCB clock stops, switches the system clock to the oscillator. VME can
// force the switch at any time (force_osc). Both behaviours follow the
// proposal; how loss is detected and when the CCB clock is taken back are
// this design's choices:
//   * A flop toggled by the CCB clock is synchronized into the oscillator
//     domain. If no toggle is seen for LOSS_CYCLES oscillator cycles the
//     clock counts as lost.
//   * Once RECOVER_EDGES toggles have been seen without another gap, the
//     clock counts as present again and, unless forced, is selected again.
//   * The multiplexer is the usual two-enable scheme: each source has an
//     enable flop clocked on its own falling edge, and an enable may only
//     rise after the other one has fallen, so no runt pulse reaches clk_sys.
//     Because a stopped CCB clock cannot clear its own enable, a lost clock
//     clears that enable asynchronously (the CCB clock has then been idle for
//     LOSS_CYCLES, so this only ends a long, stuck level).
// clk_lost and clk_on_osc are in the oscillator domain. clk_sys is a gated
// clock; in an FPGA it maps onto a dedicated clock multiplexer.
module clock_switch #(
  parameter int unsigned LOSS_CYCLES   = 8,
  parameter int unsigned RECOVER_EDGES = 1024
) (
  input  logic clk_ccb,
  input  logic clk_osc,
  input  logic rst_n,        // asynchronous, active low
  input  logic force_osc,    // asynchronous request from VME
  output logic clk_sys,
  output logic clk_lost,
  output logic clk_on_osc
);

  // ---- CCB clock activity, seen from the oscillator -------------------
  logic       tog;
  logic [2:0] tog_sync;
  logic       edge_seen;
  logic [$clog2(LOSS_CYCLES+1)-1:0]   gap;
  logic [$clog2(RECOVER_EDGES+1)-1:0] good;

  always_ff @(posedge clk_ccb or negedge rst_n)
    if (!rst_n) tog <= 1'b0;
    else        tog <= ~tog;

  assign edge_seen = tog_sync[2] ^ tog_sync[1];

  always_ff @(posedge clk_osc or negedge rst_n) begin
    if (!rst_n) begin
      tog_sync <= '0;
      gap      <= '0;
      good     <= '0;
      clk_lost <= 1'b0;
    end else begin
      tog_sync <= {tog_sync[1:0], tog};
      if (edge_seen) begin
        gap <= '0;
        if (clk_lost) begin
          if (32'(good) == RECOVER_EDGES - 1) begin
            clk_lost <= 1'b0;
            good     <= '0;
          end else begin
            good <= good + 1'b1;
          end
        end
      end else if (32'(gap) == LOSS_CYCLES - 1) begin
        clk_lost <= 1'b1;
        good     <= '0;
      end else begin
        gap <= gap + 1'b1;
      end
    end
  end

  // ---- source request ---------------------------------------------------
  logic [1:0] force_sync;
  logic       want_osc, kill_ccb;

  always_ff @(posedge clk_osc or negedge rst_n) begin
    if (!rst_n) begin
      force_sync <= '0;
      want_osc   <= 1'b0;
      kill_ccb   <= 1'b1;
    end else begin
      force_sync <= {force_sync[0], force_osc};
      want_osc   <= force_sync[1] | clk_lost;
      kill_ccb   <= clk_lost;
    end
  end

  // ---- glitch-free multiplexer -----------------------------------------
  logic [1:0] en_ccb_s, en_osc_s;   // [1] is the enable

  always_ff @(negedge clk_ccb or posedge kill_ccb)
    if (kill_ccb) en_ccb_s <= '0;
    else          en_ccb_s <= {en_ccb_s[0], ~want_osc & ~en_osc_s[1]};

  always_ff @(negedge clk_osc or negedge rst_n)
    if (!rst_n) en_osc_s <= '0;
    else        en_osc_s <= {en_osc_s[0], want_osc & ~en_ccb_s[1]};

  assign clk_sys    = (clk_ccb & en_ccb_s[1]) | (clk_osc & en_osc_s[1]);
  assign clk_on_osc = en_osc_s[1];

  a_exclusive: assert property (@(posedge clk_osc) disable iff (!rst_n)
    !(en_ccb_s[1] && en_osc_s[1]));

endmodule
