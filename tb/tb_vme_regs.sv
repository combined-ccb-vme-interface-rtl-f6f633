// Self-checking testbench for vme_regs.
// Writes and reads every register through the one-cycle access port and
// checks the control outputs: CSR bits, one-shot TTC pulses (exactly one
// cycle each), one-shot program requests, JTAG bits and TDO readback, and
// the status registers after their two-cycle synchronizers. A write with
// the low byte lane disabled must change nothing.
module tb_vme_regs;
  import ccb_vme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  logic              sel, we;
  logic [6:0]        addr;
  logic [15:0]       wdata, rdata;
  logic [1:0]        be;
  logic              force_osc, pass_ccb, pass_vme, jtag_tck, jtag_tms, jtag_tdi;
  ttc_pulses_t       vme_ttc;
  logic [N_FPGA-1:0] reconfig;
  logic              clk_lost, clk_on_osc, ccb_ready, ccb_clk_en, cfg_done, jtag_tdo;
  logic [3:0]        ccb_reserved;
  logic [N_FPGA-1:0] fpga_done, fpga_init;
  logic [5:0]        ccb_cmd;
  logic [7:0]        ccb_cmd_cnt, ccb_data, ccb_data_cnt, l1a_count, reset_count;

  vme_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [6:0] a, input logic [15:0] d, input logic [1:0] b = 2'b11);
    @(negedge clk); sel = 1; we = 1; addr = a; wdata = d; be = b;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rd(input logic [6:0] a, output logic [15:0] d);
    @(negedge clk); sel = 1; we = 0; addr = a;
    @(negedge clk); sel = 0; d = rdata;
  endtask

  // pulse counters
  int ttc_cnt [4], ttc_cycles, rc_cnt [N_FPGA];
  always_ff @(posedge clk) if (rst_n) begin
    if (vme_ttc != '0) ttc_cycles <= ttc_cycles + 1;
    if (vme_ttc.l1accept) ttc_cnt[3] <= ttc_cnt[3] + 1;
    if (vme_ttc.bx0)      ttc_cnt[2] <= ttc_cnt[2] + 1;
    if (vme_ttc.bcntres)  ttc_cnt[1] <= ttc_cnt[1] + 1;
    if (vme_ttc.evcntres) ttc_cnt[0] <= ttc_cnt[0] + 1;
    for (int i = 0; i < N_FPGA; i++) if (reconfig[i]) rc_cnt[i] <= rc_cnt[i] + 1;
  end

  logic [15:0] d;

  initial begin
    sel = 0; we = 0; addr = 0; wdata = 0; be = 0;
    ttc_cycles = 0;
    foreach (ttc_cnt[i]) ttc_cnt[i] = 0;
    foreach (rc_cnt[i]) rc_cnt[i] = 0;
    clk_lost = 0; clk_on_osc = 0; ccb_ready = 1; ccb_clk_en = 0; cfg_done = 1;
    jtag_tdo = 0; ccb_reserved = 4'hA; fpga_done = 6'b101011; fpga_init = 6'b110111;
    ccb_cmd = 6'h2C; ccb_cmd_cnt = 8'd17; ccb_data = 8'h5A; ccb_data_cnt = 8'd3;
    l1a_count = 8'd200; reset_count = 8'd2;
    #60 rst_n = 1;

    // reset values
    rd(REG_CSR, d);
    check(d == 16'h0006 && !force_osc && pass_ccb && pass_vme, "CSR reset value");
    wr(REG_CSR, 16'h0001);
    check(force_osc && !pass_ccb && !pass_vme, "CSR write drives outputs");
    rd(REG_CSR, d);
    check(d == 16'h0001, "CSR read back");
    wr(REG_CSR, 16'h0006, 2'b10);
    check(force_osc && !pass_ccb, "write with low lane off changes nothing");
    wr(REG_CSR, 16'h0006);

    // one-shot pulses
    wr(REG_TTC, 16'h0008);
    wr(REG_TTC, 16'h0008);
    wr(REG_TTC, 16'h0004);
    wr(REG_TTC, 16'h0003);
    repeat (2) @(negedge clk);
    check(ttc_cnt[3] == 2 && ttc_cnt[2] == 1 && ttc_cnt[1] == 1 && ttc_cnt[0] == 1, "TTC pulse counts");
    check(ttc_cycles == 4, $sformatf("TTC pulses last one cycle (%0d)", ttc_cycles));
    wr(REG_RECONFIG, 16'h0021);
    repeat (2) @(negedge clk);
    check(rc_cnt[0] == 1 && rc_cnt[5] == 1 && rc_cnt[1] == 0 && rc_cnt[4] == 0, "program requests");

    // JTAG
    wr(REG_JTAG, 16'h0005);
    check(jtag_tck && !jtag_tms && jtag_tdi, "JTAG outputs");
    jtag_tdo = 1;
    repeat (3) @(negedge clk);
    rd(REG_JTAG, d);
    check(d == 16'h000D, $sformatf("JTAG readback %h", d));

    // status registers
    clk_lost = 1; clk_on_osc = 1; ccb_clk_en = 1;
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d);
    check(d == {7'b0, 4'hA, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1}, $sformatf("STATUS %h", d));
    rd(REG_DONE, d);
    check(d == {2'b0, 6'b110111, 2'b0, 6'b101011}, $sformatf("DONE/INIT %h", d));
    rd(REG_CCB_CMD, d);
    check(d == 16'h112C, $sformatf("CCB command %h", d));
    rd(REG_CCB_DATA, d);
    check(d == 16'h035A, $sformatf("CCB data %h", d));
    rd(REG_COUNT, d);
    check(d == 16'h02C8, $sformatf("counters %h", d));
    rd(7'h7F, d);
    check(d == 16'h0000, "unassigned address reads zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
