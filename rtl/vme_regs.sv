// vme_regs: control and status registers of the interface FPGA itself.
//
// These registers are what lets the board be exercised from VME alone,
// without the CCB: the clock source can be forced to the on-board
// oscillator, the four CCB timing pulses (L1Accept, BX0, BCNTRES, EVCNTRES)
// can be generated as one-shot "fake" pulses, any FPGA can be sent a
// program (reconfiguration) pulse, the configuration and CCB status can be
// read back, and the board's JTAG line can be driven bit by bit. The
// proposal lists these functions; the register layout (see ccb_vme_pkg) and
// the bit-level JTAG access are this design's choices.
//
// Access comes from the internal bus controller: sel for one cycle with
// addr/we/be/wdata; rdata is combinational from addr and is read in the
// following cycle. Writes to REG_TTC and REG_RECONFIG produce one-cycle
// pulses in the cycle after the write. Status inputs that come from other
// clock domains or from pins are passed through two-flop synchronizers.
module vme_regs
  import ccb_vme_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register access
  input  logic              sel,
  input  logic              we,
  input  logic [6:0]        addr,
  input  logic [15:0]       wdata,
  input  logic [1:0]        be,
  output logic [15:0]       rdata,
  // control outputs
  output logic              force_osc,    // select the on-board oscillator
  output logic              pass_ccb,     // forward CCB timing pulses
  output logic              pass_vme,     // forward VME-generated pulses
  output ttc_pulses_t       vme_ttc,      // one-shot pulses
  output logic [N_FPGA-1:0] reconfig,     // one-shot program requests
  output logic              jtag_tck,
  output logic              jtag_tms,
  output logic              jtag_tdi,
  // status inputs (asynchronous ones are synchronized here)
  input  logic              clk_lost,
  input  logic              clk_on_osc,
  input  logic              ccb_ready,
  input  logic              ccb_clk_en,
  input  logic [3:0]        ccb_reserved,
  input  logic [N_FPGA-1:0] fpga_done,
  input  logic [N_FPGA-1:0] fpga_init,
  input  logic              cfg_done,
  input  logic              jtag_tdo,
  input  logic [5:0]        ccb_cmd,
  input  logic [7:0]        ccb_cmd_cnt,
  input  logic [7:0]        ccb_data,
  input  logic [7:0]        ccb_data_cnt,
  input  logic [7:0]        l1a_count,
  input  logic [7:0]        reset_count
);

  localparam int unsigned NS = 5 + 4 + 2*N_FPGA + 1;   // synchronized bits
  logic [NS-1:0] async_in, sync0, sync1;

  assign async_in = {clk_lost, clk_on_osc, ccb_ready, ccb_clk_en, jtag_tdo,
                     ccb_reserved, fpga_done, fpga_init, cfg_done};

  logic              s_lost, s_on_osc, s_ready, s_clk_en, s_tdo, s_cfg_done;
  logic [3:0]        s_resv;
  logic [N_FPGA-1:0] s_done, s_init;
  assign {s_lost, s_on_osc, s_ready, s_clk_en, s_tdo, s_resv, s_done, s_init,
          s_cfg_done} = sync1;

  // Every writable bit sits in the low byte (D7..D0).
  logic wr_lo;
  assign wr_lo = sel && we && be[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync0     <= '0;
      sync1     <= '0;
      force_osc <= 1'b0;
      pass_ccb  <= 1'b1;
      pass_vme  <= 1'b1;
      vme_ttc   <= '0;
      reconfig  <= '0;
      jtag_tck  <= 1'b0;
      jtag_tms  <= 1'b1;
      jtag_tdi  <= 1'b0;
    end else begin
      sync0    <= async_in;
      sync1    <= sync0;
      vme_ttc  <= '0;
      reconfig <= '0;
      if (wr_lo) begin
        unique case (addr)
          REG_CSR:      {pass_vme, pass_ccb, force_osc} <= wdata[2:0];
          REG_TTC:      vme_ttc  <= ttc_pulses_t'(wdata[3:0]);
          REG_RECONFIG: reconfig <= wdata[N_FPGA-1:0];
          REG_JTAG:     {jtag_tdi, jtag_tms, jtag_tck} <= wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      REG_CSR:      rdata[2:0] = {pass_vme, pass_ccb, force_osc};
      REG_STATUS:   rdata[8:0] = {s_resv, s_cfg_done, s_clk_en, s_ready, s_on_osc, s_lost};
      REG_DONE:   begin
        rdata[N_FPGA-1:0]   = s_done;
        rdata[8+N_FPGA-1:8] = s_init;
      end
      REG_CCB_CMD:  rdata = {ccb_cmd_cnt, 2'b00, ccb_cmd};
      REG_CCB_DATA: rdata = {ccb_data_cnt, ccb_data};
      REG_JTAG:     rdata[3:0] = {s_tdo, jtag_tdi, jtag_tms, jtag_tck};
      REG_COUNT:    rdata = {reset_count, l1a_count};
      default: ;
    endcase
  end

endmodule
