// Self-checking testbench for ib_controller.
// Issues accesses to the register region, each Front FPGA, the Main FPGA and
// unmapped addresses. The external FPGAs are modelled as one 16-bit
// register per FPGA read over the shared bus; the register file as a
// function of its address. Checks: the right CE* alone, held for exactly
// WAIT_CYCLES clocks, region-relative address, write data and strobe,
// read data, ack latency (WAIT_CYCLES+1 clocks for external, 2 for the
// register file), err for unmapped addresses and no CE* then.
module tb_ib_controller;
  import ccb_vme_pkg::*;

  localparam int unsigned WAIT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  logic              start, we, ack, err;
  logic [18:1]       addr, ext_addr;
  logic [15:0]       wdata, rdata, reg_wdata, reg_rdata, ext_wdata, ext_rdata;
  logic [1:0]        be, reg_be, ext_be;
  logic              reg_sel, reg_we, ext_we, ext_oe;
  logic [6:0]        reg_addr;
  logic [N_FPGA-1:0] ext_ce_n;

  ib_controller #(.WAIT_CYCLES(WAIT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // register file model
  assign reg_rdata = {9'h155, reg_addr};

  // external FPGA model: one register per FPGA, plus CE* width measurement
  logic [15:0] ext_reg [N_FPGA];
  int ce_len [N_FPGA];
  logic [18:1] seen_addr;
  always_comb begin
    ext_rdata = 16'hDEAD;
    for (int i = 0; i < N_FPGA; i++)
      if (!ext_ce_n[i] && ext_oe) ext_rdata = ext_reg[i] ^ 16'(ext_addr);
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_FPGA; i++) begin
      if (!ext_ce_n[i]) begin
        ce_len[i] <= ce_len[i] + 1;
        seen_addr <= ext_addr;
        if (ext_we) ext_reg[i] <= ext_wdata;
      end
    end
  end

  task automatic access(input logic [18:0] a, input logic w, input logic [15:0] d,
                        output logic [15:0] r, output logic e, output int lat);
    @(negedge clk);
    addr = a[18:1]; we = w; wdata = d; be = 2'b11; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!ack && !err && lat < 50) begin @(negedge clk); lat++; end
    r = rdata; e = err;
  endtask

  logic [15:0] r; logic e; int lat;
  logic [18:0] base;

  initial begin
    start = 0; addr = 0; we = 0; wdata = 0; be = 0;
    for (int i = 0; i < N_FPGA; i++) begin ext_reg[i] = 0; ce_len[i] = 0; end
    #60 rst_n = 1'b1;

    // register file
    access(19'h00006, 0, 0, r, e, lat);
    check(!e && r == {9'h155, 7'h03}, "register read data");
    check(lat == 2, $sformatf("register latency %0d", lat));
    fork
      begin access(19'h00010, 1, 16'h00A5, r, e, lat); end
      begin
        @(posedge reg_sel);
        check(reg_we && reg_addr == 7'h08 && reg_wdata == 16'h00A5, "register write strobe");
      end
    join

    // each external FPGA: write then read
    for (int i = 0; i < N_FPGA; i++) begin
      base = (i < N_FRONT) ? 19'(32'h100 * (i + 1)) : 19'h40000;
      for (int k = 0; k < N_FPGA; k++) ce_len[k] = 0;
      access(base + 19'h2E, 1, 16'(16'h1000 * (i+1) + 7), r, e, lat);
      check(!e && lat == WAIT + 1, $sformatf("FPGA %0d write latency %0d", i, lat));
      check(ext_reg[i] == 16'(16'h1000 * (i+1) + 7), $sformatf("FPGA %0d written", i));
      check(seen_addr == 18'h17, $sformatf("FPGA %0d relative address %h", i, seen_addr));
      for (int k = 0; k < N_FPGA; k++)
        check(ce_len[k] == ((k == i) ? WAIT : 0), $sformatf("FPGA %0d: CE%0d width %0d", i, k, ce_len[k]));
      access(base + 19'h2E, 0, 0, r, e, lat);
      check(!e && r == (ext_reg[i] ^ 16'h0017), $sformatf("FPGA %0d read data %h", i, r));
      check(ext_ce_n == '1, "CE* released after access");
    end

    // unmapped
    for (int k = 0; k < N_FPGA; k++) ce_len[k] = 0;
    access(19'h00600, 0, 0, r, e, lat);
    check(e && lat == 1, "unmapped address gives err at once");
    access(19'h3FFFE, 1, 16'h1, r, e, lat);
    check(e, "unmapped high address gives err");
    for (int k = 0; k < N_FPGA; k++) check(ce_len[k] == 0, "no CE* for unmapped address");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
