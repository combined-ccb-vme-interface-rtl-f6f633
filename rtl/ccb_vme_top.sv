// ccb_vme_top: the combined CCB-VME interface FPGA of the sector-processor
// board.
//
// One FPGA carries both the VME slave and the CCB interface, so that the
// Main FPGA is left to track finding and the board can be configured,
// loaded, read back and exercised over VME even when the mezzanine card or
// the CCB is absent. Inside:
//   clock_switch     CCB 40 MHz clock, or the on-board oscillator when the
//                    CCB clock is lost or VME forces it; gives clk_sys.
//   vme_slave        A24/D16 slave (single cycles and BLT), slot-addressed.
//   ib_controller    downloading/readout bus: one CE* per Front/Main FPGA,
//                    plus the local register file.
//   vme_regs         clock override, VME-generated timing pulses, program
//                    requests, status readback, JTAG line.
//   ttc_fanout       BX0, BCNTRES, EVCNTRES, L1ACCEPT from the CCB or VME to
//                    every FPGA.
//   ccb_cmd_decoder  CCB command and data capture.
//   reset_config     SP_HARD_RESET / VME program pulses to every FPGA, DONE
//                    and INIT collected into SP_CFG_DONE.
// Everything but the clock-loss detector runs on clk_sys. The system reset
// is the board's power-on reset combined with VME SYSRESET*, released
// synchronously to clk_sys. clk_sys is brought out for the board's clock
// de-skew (done by the DLLs of the Virtex devices). The CCB-side port names
// follow the backplane signal list; the fast-control and reload lines are
// taken as active high after the backplane receivers, VME lines keep their
// active-low sense. SP_RESERVED[3:0] has no assigned use and is driven low.
module ccb_vme_top
  import ccb_vme_pkg::*;
#(
  parameter int unsigned IB_WAIT_CYCLES = 4,
  parameter int unsigned LOSS_CYCLES    = 8,
  parameter int unsigned RECOVER_EDGES  = 1024,
  parameter int unsigned PROG_CYCLES    = 12
) (
  // clocks and board reset
  input  logic              osc_clock40,
  input  logic              ccb_clock40,
  input  logic              ccb_clock40_enable,
  input  logic              por_n,
  output logic              clk_sys,
  output logic              clk_on_osc,
  // CCB fast control bus
  input  logic [5:0]        ccb_cmd,
  input  logic              ccb_cmd_strobe,
  input  logic              ccb_evcntres,
  input  logic              ccb_bcntres,
  input  logic              ccb_bx0,
  input  logic              ccb_l1accept,
  input  logic [7:0]        ccb_data,
  input  logic              ccb_data_strobe,
  input  logic [3:0]        ccb_reserved,
  input  logic              ccb_ready,
  // CCB reload bus and reserved outputs
  input  logic              sp_hard_reset,
  output logic              sp_cfg_done,
  output logic [3:0]        sp_reserved,
  // VME P1/J1
  input  logic              vme_sysreset_n,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic              vme_iack_n,
  input  logic [5:0]        vme_am,
  input  logic [23:1]       vme_a,
  input  logic [4:0]        vme_ga_n,
  input  logic              vme_gap_n,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic              vme_berr_n,
  // downloading/readout bus to the Front FPGAs and the Main FPGA
  output logic [N_FPGA-1:0] ib_ce_n,
  output logic [18:1]       ib_addr,
  output logic [15:0]       ib_wdata,
  output logic [1:0]        ib_be,
  output logic              ib_we,
  output logic              ib_oe,
  input  logic [15:0]       ib_rdata,
  // timing signals and commands to the FPGAs
  output ttc_pulses_t       ttc_out [N_FPGA],
  output logic              sp_cmd_valid,
  output logic [5:0]        sp_cmd,
  // configuration of the FPGAs
  output logic [N_FPGA-1:0] fpga_prog_n,
  input  logic [N_FPGA-1:0] fpga_done,
  input  logic [N_FPGA-1:0] fpga_init,
  // JTAG line
  output logic              jtag_tck,
  output logic              jtag_tms,
  output logic              jtag_tdi,
  input  logic              jtag_tdo
);

  logic rst_n;
  logic clk_lost, force_osc, pass_ccb, pass_vme;

  assign sp_reserved = '0;

  clock_switch #(.LOSS_CYCLES(LOSS_CYCLES), .RECOVER_EDGES(RECOVER_EDGES)) u_clk (
    .clk_ccb(ccb_clock40), .clk_osc(osc_clock40), .rst_n(por_n),
    .force_osc(force_osc), .clk_sys(clk_sys), .clk_lost(clk_lost),
    .clk_on_osc(clk_on_osc)
  );

  reset_sync u_rst (.clk(clk_sys), .rst_n_in(por_n & vme_sysreset_n), .rst_n_out(rst_n));

  // ---- VME side -----------------------------------------------------------
  logic        ib_start, ib_ack, ib_err, ib_wr;
  logic [18:1] ib_a;
  logic [15:0] ib_wd, ib_rd;
  logic [1:0]  ib_b;

  vme_slave u_vme (
    .clk(clk_sys), .rst_n(rst_n),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_iack_n, .vme_am,
    .vme_a, .vme_ga_n, .vme_gap_n, .vme_d_in, .vme_d_out, .vme_d_oe,
    .vme_dtack_n, .vme_berr_n,
    .ib_start, .ib_addr(ib_a), .ib_wdata(ib_wd), .ib_be(ib_b), .ib_we(ib_wr),
    .ib_ack, .ib_err, .ib_rdata(ib_rd), .selected()
  );

  logic        reg_sel, reg_we;
  logic [6:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic [1:0]  reg_be;

  ib_controller #(.WAIT_CYCLES(IB_WAIT_CYCLES)) u_ib (
    .clk(clk_sys), .rst_n(rst_n),
    .start(ib_start), .addr(ib_a), .wdata(ib_wd), .be(ib_b), .we(ib_wr),
    .ack(ib_ack), .err(ib_err), .rdata(ib_rd),
    .reg_sel, .reg_we, .reg_addr, .reg_wdata, .reg_be, .reg_rdata,
    .ext_ce_n(ib_ce_n), .ext_addr(ib_addr), .ext_wdata(ib_wdata),
    .ext_be(ib_be), .ext_we(ib_we), .ext_oe(ib_oe), .ext_rdata(ib_rdata)
  );

  // ---- CCB side -----------------------------------------------------------
  ttc_pulses_t vme_ttc, ccb_ttc;
  logic [N_FPGA-1:0] reconfig;
  logic [5:0]  cmd_last;
  logic [7:0]  cmd_cnt, data_last, data_cnt, l1a_count, reset_count;

  assign ccb_ttc = '{l1accept: ccb_l1accept, bx0: ccb_bx0,
                     bcntres: ccb_bcntres, evcntres: ccb_evcntres};

  ttc_fanout u_ttc (
    .clk(clk_sys), .rst_n(rst_n), .ccb_in(ccb_ttc), .vme_in(vme_ttc),
    .pass_ccb, .pass_vme, .fpga_out(ttc_out), .l1a_count
  );

  ccb_cmd_decoder u_cmd (
    .clk(clk_sys), .rst_n(rst_n),
    .ccb_cmd, .ccb_cmd_strobe, .ccb_data, .ccb_data_strobe,
    .cmd_valid(sp_cmd_valid), .cmd(cmd_last), .cmd_cnt,
    .data_valid(), .data(data_last), .data_cnt, .cmd_hit()
  );
  assign sp_cmd = cmd_last;

  reset_config #(.PROG_CYCLES(PROG_CYCLES)) u_cfg (
    .clk(clk_sys), .rst_n(rst_n), .hard_reset(sp_hard_reset),
    .reconfig, .done(fpga_done), .init(fpga_init),
    .prog_n(fpga_prog_n), .cfg_done(sp_cfg_done), .reset_count
  );

  vme_regs u_regs (
    .clk(clk_sys), .rst_n(rst_n),
    .sel(reg_sel), .we(reg_we), .addr(reg_addr), .wdata(reg_wdata),
    .be(reg_be), .rdata(reg_rdata),
    .force_osc, .pass_ccb, .pass_vme, .vme_ttc, .reconfig,
    .jtag_tck, .jtag_tms, .jtag_tdi,
    .clk_lost, .clk_on_osc, .ccb_ready, .ccb_clk_en(ccb_clock40_enable),
    .ccb_reserved, .fpga_done, .fpga_init, .cfg_done(sp_cfg_done),
    .jtag_tdo, .ccb_cmd(cmd_last), .ccb_cmd_cnt(cmd_cnt),
    .ccb_data(data_last), .ccb_data_cnt(data_cnt),
    .l1a_count, .reset_count
  );

endmodule
