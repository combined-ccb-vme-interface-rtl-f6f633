// End-to-end testbench for ccb_vme_top at its default parameters.
// Around the interface FPGA it models: a VME master (slot 9), the five
// Front FPGAs and the Main FPGA as register files on the downloading/readout
// bus that also pull DONE low while being programmed, the CCB (clock and
// fast-control/reload lines) and a JTAG chain that returns TDI inverted.
// It runs one complete session: VME access to every destination (single
// cycles and a block transfer), a bus error and a foreign-slot cycle, CCB
// timing pulses and VME fake pulses fanned out to all six FPGAs (each one
// clock wide), source masking, CCB command/data capture read back over VME,
// a CCB hard reset and a VME reprogram request with SP_CFG_DONE following
// DONE, JTAG bit access, loss of the CCB clock with VME access continuing
// on the oscillator, recovery, and a VME-forced switch. Every mechanism is
// counted and one that never happened is a failure.
module tb_ccb_vme_top;
  import ccb_vme_pkg::*;

  localparam logic [4:0] SLOT = 5'd9;

  // ---- clocks ------------------------------------------------------------
  logic osc_clock40 = 1'b0, ccb_clock40 = 1'b0;
  bit   ccb_run = 1'b1;
  always #12.5 osc_clock40 = ~osc_clock40;
  initial begin
    #6;
    forever begin
      #12.5;
      if (ccb_run) ccb_clock40 = ~ccb_clock40;
    end
  end

  // ---- DUT ---------------------------------------------------------------
  logic              ccb_clock40_enable, por_n, clk_sys, clk_on_osc;
  logic [5:0]        ccb_cmd, sp_cmd;
  logic              ccb_cmd_strobe, ccb_evcntres, ccb_bcntres, ccb_bx0, ccb_l1accept;
  logic [7:0]        ccb_data;
  logic              ccb_data_strobe, ccb_ready, sp_hard_reset, sp_cfg_done;
  logic [3:0]        ccb_reserved, sp_reserved;
  logic              vme_sysreset_n, vme_as_n, vme_write_n, vme_lword_n, vme_iack_n, vme_gap_n;
  logic [1:0]        vme_ds_n;
  logic [5:0]        vme_am;
  logic [23:1]       vme_a;
  logic [4:0]        vme_ga_n;
  logic [15:0]       vme_d_in, vme_d_out;
  logic              vme_d_oe, vme_dtack_n, vme_berr_n;
  logic [N_FPGA-1:0] ib_ce_n;
  logic [18:1]       ib_addr;
  logic [15:0]       ib_wdata, ib_rdata;
  logic [1:0]        ib_be;
  logic              ib_we, ib_oe;
  ttc_pulses_t       ttc_out [N_FPGA];
  logic              sp_cmd_valid;
  logic [N_FPGA-1:0] fpga_prog_n, fpga_done, fpga_init;
  logic              jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;

  ccb_vme_top dut (.*);

  `include "vme_master_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---- FPGA models on the internal bus ----------------------------------
  logic [15:0] fmem [N_FPGA][256];
  int          busy [N_FPGA];
  always_comb begin
    ib_rdata = 16'hFFFF;
    for (int i = 0; i < N_FPGA; i++)
      if (!ib_ce_n[i] && ib_oe) ib_rdata = fmem[i][ib_addr[8:1]];
  end
  always_ff @(posedge clk_sys) begin
    for (int i = 0; i < N_FPGA; i++) begin
      if (!ib_ce_n[i] && ib_we) begin
        if (ib_be[1]) fmem[i][ib_addr[8:1]][15:8] <= ib_wdata[15:8];
        if (ib_be[0]) fmem[i][ib_addr[8:1]][7:0]  <= ib_wdata[7:0];
      end
      if (!fpga_prog_n[i]) begin busy[i] <= 8; fpga_done[i] <= 1'b0; end
      else if (busy[i] != 0) busy[i] <= busy[i] - 1;
      else fpga_done[i] <= 1'b1;
    end
  end
  assign jtag_tdo = ~jtag_tdi;

  // ---- monitors -----------------------------------------------------------
  int n_pulse [N_FPGA][4];      // per FPGA: l1a, bx0, bcntres, evcntres
  int wide_pulses = 0, n_cmd_valid = 0, prog_low [N_FPGA], prog_len [N_FPGA];
  ttc_pulses_t prev_out [N_FPGA];
  // sampled mid-cycle, on the falling edge of the system clock
  always @(negedge clk_sys) if (por_n) begin
    for (int i = 0; i < N_FPGA; i++) begin
      if ((ttc_out[i] & prev_out[i]) != '0) wide_pulses++;
      prev_out[i] = ttc_out[i];
      if (ttc_out[i].l1accept) n_pulse[i][0]++;
      if (ttc_out[i].bx0)      n_pulse[i][1]++;
      if (ttc_out[i].bcntres)  n_pulse[i][2]++;
      if (ttc_out[i].evcntres) n_pulse[i][3]++;
      if (!fpga_prog_n[i]) prog_low[i]++;
      else if (prog_low[i] != 0) begin prog_len[i] = prog_low[i]; prog_low[i] = 0; end
    end
    if (sp_cmd_valid) n_cmd_valid++;
  end

  // mechanisms
  typedef enum int {M_REG, M_FRONT, M_MAIN, M_BLT, M_BERR, M_IGNORE, M_CCB_TTC,
                    M_VME_TTC, M_MASK, M_CMD, M_DATA, M_HARD_RESET, M_RECONFIG,
                    M_JTAG, M_CLK_LOSS, M_CLK_RECOVER, M_CLK_FORCE, M_NUM} mech_e;
  int mech [M_NUM];

  // ---- helpers ------------------------------------------------------------
  function automatic logic [23:0] badr(input logic [18:0] ofs);
    return {SLOT, ofs};
  endfunction
  logic [15:0] rd;
  int resp;

  task automatic vw(input logic [18:0] ofs, input logic [15:0] d);
    vme_cycle(6'h39, badr(ofs), 1, 2'b11, d, rd, resp);
    check(resp == 0, $sformatf("write %h acknowledged", ofs));
  endtask
  task automatic vr(input logic [18:0] ofs, output logic [15:0] d);
    vme_cycle(6'h3D, badr(ofs), 0, 2'b11, 0, d, resp);
    check(resp == 0, $sformatf("read %h acknowledged", ofs));
  endtask
  function automatic logic [18:0] reg_ofs(input reg_addr_e r);
    return 19'({r, 1'b0});
  endfunction

  task automatic ccb_pulse(input ttc_pulses_t p);
    @(posedge ccb_clock40); #2;
    {ccb_l1accept, ccb_bx0, ccb_bcntres, ccb_evcntres} = p;
    @(posedge ccb_clock40); #2;
    {ccb_l1accept, ccb_bx0, ccb_bcntres, ccb_evcntres} = '0;
  endtask

  function automatic int sum_pulses(input int kind);
    int s = 0;
    for (int i = 0; i < N_FPGA; i++) s += n_pulse[i][kind];
    return s;
  endfunction

  logic [15:0] d;
  int s0, t0;

  initial begin
    vme_idle();
    vme_ga_n = ~SLOT; vme_gap_n = ~(^vme_ga_n);
    por_n = 0; vme_sysreset_n = 1; ccb_clock40_enable = 0;
    ccb_cmd = 0; ccb_cmd_strobe = 0; ccb_data = 0; ccb_data_strobe = 0;
    {ccb_l1accept, ccb_bx0, ccb_bcntres, ccb_evcntres} = '0;
    ccb_reserved = 4'h0; ccb_ready = 1; sp_hard_reset = 0;
    fpga_init = '1; fpga_done = '1;
    for (int i = 0; i < N_FPGA; i++) begin
      busy[i] = 0; prog_low[i] = 0; prog_len[i] = 0; prev_out[i] = '0;
      for (int k = 0; k < 4; k++) n_pulse[i][k] = 0;
      for (int k = 0; k < 256; k++) fmem[i][k] = 16'(i * 256 + k);
    end
    foreach (mech[m]) mech[m] = 0;
    #200 por_n = 1;
    #500;

    // -- registers and status
    vr(reg_ofs(REG_CSR), d);
    check(d == 16'h0006, $sformatf("CSR after reset %h", d));
    vr(reg_ofs(REG_STATUS), d);
    check(d[1:0] == 2'b00 && d[2] && d[4], $sformatf("status: on CCB clock, ready, configured (%h)", d));
    mech[M_REG]++;

    // -- every Front FPGA and the Main FPGA
    for (int i = 0; i < N_FPGA; i++) begin
      logic [18:0] base;
      base = (i < N_FRONT) ? 19'(32'h100 * (i + 1)) : 19'h40000;
      vw(base + 19'h10, 16'hC000 + 16'(i));
      check(fmem[i][8] == 16'hC000 + 16'(i), $sformatf("FPGA %0d written", i));
      vr(base + 19'h12, d);
      check(d == 16'(i * 256 + 9), $sformatf("FPGA %0d read %h", i, d));
      if (i < N_FRONT) mech[M_FRONT]++; else mech[M_MAIN]++;
    end

    // -- block transfer into Front FPGA 2 (e.g. a test pattern)
    vme_am = 6'h3B; vme_a = badr(19'h300 + 19'h40) >> 1;
    #40 vme_as_n = 1'b0;
    for (int k = 0; k < 8; k++) begin
      vme_data_phase(1, 2'b11, 16'h7700 + 16'(k), rd, resp);
      check(resp == 0, "BLT beat");
    end
    vme_as_n = 1'b1; #40;
    for (int k = 0; k < 8; k++) check(fmem[2][32 + k] == 16'h7700 + 16'(k), "BLT data in Front FPGA 2");
    mech[M_BLT]++;

    // -- bus error and a cycle for another board
    vme_cycle(6'h39, badr(19'h01000), 0, 2'b11, 0, rd, resp);
    check(resp == 1, "unmapped address gives BERR*");
    mech[M_BERR] += (resp == 1);
    vme_cycle(6'h39, {5'd10, 19'h00100}, 1, 2'b11, 16'h0BAD, rd, resp);
    check(resp == 2 && fmem[0][0] == 16'h0000, "other slot's cycle ignored");
    mech[M_IGNORE] += (resp == 2);

    // -- CCB timing pulses
    ccb_pulse('{l1accept: 1, bx0: 0, bcntres: 0, evcntres: 0});
    repeat (4) @(posedge clk_sys);
    check(sum_pulses(0) == N_FPGA && sum_pulses(1) == 0, "CCB L1Accept alone reaches every FPGA");
    ccb_pulse('{l1accept: 0, bx0: 1, bcntres: 0, evcntres: 0});
    repeat (4) @(posedge clk_sys);
    check(sum_pulses(0) == N_FPGA && sum_pulses(1) == N_FPGA, "CCB BX0 alone reaches every FPGA");
    ccb_pulse('{l1accept: 0, bx0: 0, bcntres: 1, evcntres: 1});
    repeat (4) @(posedge clk_sys);
    for (int i = 0; i < N_FPGA; i++)
      check(n_pulse[i][0] == 1 && n_pulse[i][1] == 1 && n_pulse[i][2] == 1 && n_pulse[i][3] == 1,
            $sformatf("CCB pulses reach FPGA %0d (%0d %0d %0d %0d)", i,
                      n_pulse[i][0], n_pulse[i][1], n_pulse[i][2], n_pulse[i][3]));
    mech[M_CCB_TTC]++;

    // -- fake L1Accepts from VME
    vw(reg_ofs(REG_TTC), 16'h0008);
    vw(reg_ofs(REG_TTC), 16'h0008);
    vw(reg_ofs(REG_TTC), 16'h0004);
    repeat (4) @(posedge clk_sys);
    check(sum_pulses(0) == 3 * N_FPGA && sum_pulses(1) == 2 * N_FPGA, "fake L1Accepts and BX0 reach every FPGA");
    mech[M_VME_TTC]++;

    // -- mask the CCB source
    vw(reg_ofs(REG_CSR), 16'h0004);
    ccb_pulse('{l1accept: 1, bx0: 0, bcntres: 0, evcntres: 0});
    repeat (4) @(posedge clk_sys);
    check(sum_pulses(0) == 3 * N_FPGA, "masked CCB L1Accept not forwarded");
    vw(reg_ofs(REG_CSR), 16'h0006);
    mech[M_MASK]++;
    vr(reg_ofs(REG_COUNT), d);
    check(d[7:0] == 8'd3, $sformatf("L1Accept counter %0d", d[7:0]));
    check(wide_pulses == 0, "fanned-out pulses are one clock wide");

    // -- CCB command and data
    @(posedge ccb_clock40); #2; ccb_cmd = 6'h2A; ccb_cmd_strobe = 1;
    @(posedge ccb_clock40); #2; ccb_cmd_strobe = 0; ccb_cmd = 6'h15;
    @(posedge ccb_clock40); #2; ccb_data = 8'hC3; ccb_data_strobe = 1;
    @(posedge ccb_clock40); #2; ccb_data_strobe = 0; ccb_data = 8'h00;
    repeat (4) @(posedge clk_sys);
    check(n_cmd_valid == 1 && sp_cmd == 6'h2A,
          $sformatf("command forwarded to the FPGAs (%0d, %h)", n_cmd_valid, sp_cmd));
    vr(reg_ofs(REG_CCB_CMD), d);
    check(d == 16'h012A, $sformatf("command register %h", d));
    mech[M_CMD] += (d == 16'h012A);
    vr(reg_ofs(REG_CCB_DATA), d);
    check(d == 16'h01C3, $sformatf("data register %h", d));
    mech[M_DATA] += (d == 16'h01C3);

    // -- CCB hard reset: all FPGAs reprogrammed
    @(posedge ccb_clock40); sp_hard_reset = 1;
    #300 sp_hard_reset = 0;
    #200;
    check(!sp_cfg_done, "SP_CFG_DONE low while FPGAs reload");
    #600;
    for (int i = 0; i < N_FPGA; i++)
      check(prog_len[i] * 25 >= 300, $sformatf("FPGA %0d program pulse %0d clocks", i, prog_len[i]));
    check(sp_cfg_done, "SP_CFG_DONE back");
    vr(reg_ofs(REG_COUNT), d);
    check(d[15:8] == 8'd1, "hard reset counted");
    mech[M_HARD_RESET]++;

    // -- VME reprogram of the Main FPGA only
    for (int i = 0; i < N_FPGA; i++) prog_len[i] = 0;
    vw(reg_ofs(REG_RECONFIG), 16'h0020);
    #800;
    for (int i = 0; i < N_FPGA; i++)
      check((prog_len[i] != 0) == (i == N_FPGA - 1), $sformatf("reprogram request FPGA %0d", i));
    vr(reg_ofs(REG_DONE), d);
    check(d == 16'h3F3F, $sformatf("DONE/INIT readback %h", d));
    mech[M_RECONFIG]++;

    // -- JTAG line
    vw(reg_ofs(REG_JTAG), 16'h0006);
    check(!jtag_tck && jtag_tms && jtag_tdi, "JTAG pins");
    vr(reg_ofs(REG_JTAG), d);
    check(d == 16'h0006, $sformatf("JTAG TDO readback %h", d));
    vw(reg_ofs(REG_JTAG), 16'h0001);
    vr(reg_ofs(REG_JTAG), d);
    check(d == 16'h0009, $sformatf("JTAG TDO readback %h", d));
    mech[M_JTAG]++;

    // -- CCB clock lost: board keeps working on the oscillator
    ccb_run = 0;
    #1000;
    check(clk_on_osc, "switched to the oscillator");
    vr(reg_ofs(REG_STATUS), d);
    check(d[1:0] == 2'b11, $sformatf("status shows lost clock (%h)", d));
    vw(19'h500 + 19'h20, 16'h5151);
    vr(19'h500 + 19'h20, d);
    check(d == 16'h5151, "VME access to Front FPGA 4 on the oscillator");
    vw(reg_ofs(REG_TTC), 16'h0008);
    repeat (4) @(posedge clk_sys);
    check(sum_pulses(0) == 4 * N_FPGA, "fake L1Accept without the CCB");
    mech[M_CLK_LOSS] += clk_on_osc;
    ccb_run = 1;
    #30000;
    check(!clk_on_osc, "CCB clock taken back");
    vr(reg_ofs(REG_STATUS), d);
    check(d[1:0] == 2'b00, $sformatf("status after recovery %h", d));
    mech[M_CLK_RECOVER] += !clk_on_osc;

    // -- VME-forced oscillator
    vw(reg_ofs(REG_CSR), 16'h0007);
    #500;
    check(clk_on_osc, "forced to the oscillator");
    vr(reg_ofs(REG_STATUS), d);
    check(d[1:0] == 2'b10, $sformatf("status forced %h", d));
    mech[M_CLK_FORCE] += clk_on_osc;
    vw(reg_ofs(REG_CSR), 16'h0006);
    #500;
    check(!clk_on_osc, "force released");

    for (int m = 0; m < M_NUM; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %0d happened (%0d times)", m, mech[m]));
      $display("mechanism %0d: %0d", m, mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge osc_clock40);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
