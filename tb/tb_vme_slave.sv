// Self-checking testbench for vme_slave.
// A behavioural VME master (vme_master_tasks.svh) runs cycles against the
// slave at 40 MHz; a small memory model stands in for the internal bus and
// answers after a random 1-4 cycle delay, with an error for word addresses
// at or above 0x20000. Checks: word and byte writes/reads, all six A24
// address modifiers, silence for a foreign AM code, a foreign slot number,
// a GA parity error, LWORD* low and IACK* cycles, BERR* for an unmapped
// address, D16 block transfers with address increment, and exactly one
// internal access per data phase.
module tb_vme_slave;
  import ccb_vme_pkg::*;

  localparam logic [4:0] SLOT = 5'd5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  logic        vme_as_n, vme_write_n, vme_lword_n, vme_iack_n, vme_gap_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [23:1] vme_a;
  logic [4:0]  vme_ga_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n, vme_berr_n;
  logic        ib_start, ib_we, ib_ack, ib_err, selected;
  logic [18:1] ib_addr;
  logic [15:0] ib_wdata, ib_rdata;
  logic [1:0]  ib_be;

  vme_slave dut (.*);

  `include "vme_master_tasks.svh"

  int checks = 0, failures = 0;
  int starts = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- internal bus model ---------------------------------------------
  logic [15:0] mem [256];
  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 16'(i * 3 + 1);
  end

  initial begin
    ib_ack = 0; ib_err = 0; ib_rdata = 0;
    forever begin
      @(posedge clk);
      if (ib_start) begin
        int d;
        logic [18:1] a;
        logic        w;
        logic [15:0] wd;
        logic [1:0]  b;
        starts++;
        a = ib_addr; w = ib_we; wd = ib_wdata; b = ib_be;
        d = 1 + int'($urandom_range(0, 3));
        repeat (d - 1) @(posedge clk);
        #1;
        if (a >= 18'h20000) begin
          ib_err = 1'b1;
        end else begin
          if (w) begin
            if (b[1]) mem[a[8:1]][15:8] = wd[15:8];
            if (b[0]) mem[a[8:1]][7:0]  = wd[7:0];
          end
          ib_rdata = mem[a[8:1]];
          ib_ack   = 1'b1;
        end
        @(posedge clk); #1;
        ib_ack = 0; ib_err = 0;
      end
    end
  end

  // ---- stimulus --------------------------------------------------------
  function automatic logic [23:0] badr(input logic [18:0] ofs);
    return {SLOT, ofs};
  endfunction

  logic [15:0] rd;
  int resp, s0;
  logic [5:0] ams [6] = '{6'h39, 6'h3A, 6'h3D, 6'h3E, 6'h3B, 6'h3F};

  initial begin
    vme_idle();
    vme_ga_n  = ~SLOT;
    vme_gap_n = ~(^vme_ga_n);        // odd parity over GA*[4:0], GAP*
    #100 rst_n = 1'b1;
    #100;

    // word write and read back
    vme_cycle(6'h39, badr(19'h00010), 1, 2'b11, 16'hBEEF, rd, resp);
    check(resp == 0, "write gets DTACK");
    check(mem[8] == 16'hBEEF, "write reaches memory");
    vme_cycle(6'h39, badr(19'h00010), 0, 2'b11, 0, rd, resp);
    check(resp == 0 && rd == 16'hBEEF, "read back");

    // byte lanes
    vme_cycle(6'h3D, badr(19'h00010), 1, 2'b10, 16'h12FF, rd, resp);
    check(resp == 0 && mem[8] == 16'h12EF, "DS1* writes D15..D8 only");
    vme_cycle(6'h3D, badr(19'h00010), 1, 2'b01, 16'hFF34, rd, resp);
    check(resp == 0 && mem[8] == 16'h1234, "DS0* writes D7..D0 only");

    // every A24 modifier is answered
    foreach (ams[i]) begin
      vme_cycle(ams[i], badr(19'h00020 + 19'(2*i)), 0, 2'b11, 0, rd, resp);
      check(resp == 0 && rd == mem[16+i], $sformatf("AM %h answered", ams[i]));
    end

    // cycles the board must ignore
    s0 = starts;
    vme_cycle(6'h09, badr(19'h00010), 0, 2'b11, 0, rd, resp);
    check(resp == 2, "A32 AM ignored");
    vme_cycle(6'h39, {5'd6, 19'h00010}, 0, 2'b11, 0, rd, resp);
    check(resp == 2, "other slot ignored");
    vme_lword_n = 1'b0;
    vme_cycle(6'h39, badr(19'h00010), 0, 2'b11, 0, rd, resp);
    check(resp == 2, "D32 (LWORD* low) ignored");
    vme_lword_n = 1'b1;
    vme_iack_n = 1'b0;
    vme_cycle(6'h39, badr(19'h00010), 0, 2'b11, 0, rd, resp);
    check(resp == 2, "IACK cycle ignored");
    vme_iack_n = 1'b1;
    vme_gap_n = ~vme_gap_n;
    vme_cycle(6'h39, badr(19'h00010), 0, 2'b11, 0, rd, resp);
    check(resp == 2, "GA parity error ignored");
    vme_gap_n = ~vme_gap_n;
    check(starts == s0, "no internal access for ignored cycles");

    // bus error
    vme_cycle(6'h39, badr(19'h40000), 0, 2'b11, 0, rd, resp);
    check(resp == 1, "unmapped address gets BERR*");
    vme_cycle(6'h39, badr(19'h00012), 0, 2'b11, 0, rd, resp);
    check(resp == 0 && rd == mem[9], "next cycle after BERR* works");

    // block transfer: write 6 words, read them back
    s0 = starts;
    vme_am = 6'h3B; vme_a = badr(19'h00080) >> 1;
    #40 vme_as_n = 1'b0;
    for (int i = 0; i < 6; i++) begin
      vme_data_phase(1, 2'b11, 16'hA000 + 16'(i), rd, resp);
      check(resp == 0, "BLT write beat");
    end
    vme_as_n = 1'b1; #40;
    for (int i = 0; i < 6; i++)
      check(mem[64+i] == 16'hA000 + 16'(i), $sformatf("BLT word %0d stored at its address", i));
    vme_am = 6'h3F; vme_a = badr(19'h00080) >> 1;
    #40 vme_as_n = 1'b0;
    for (int i = 0; i < 6; i++) begin
      vme_data_phase(0, 2'b11, 0, rd, resp);
      check(resp == 0 && rd == 16'hA000 + 16'(i), "BLT read beat");
    end
    vme_as_n = 1'b1; #40;
    check(starts - s0 == 12, "one internal access per BLT beat");

    // a non-BLT cycle does not increment: two phases under one AS* give one access
    s0 = starts;
    vme_am = 6'h39; vme_a = badr(19'h00010) >> 1;
    #40 vme_as_n = 1'b0;
    vme_data_phase(0, 2'b11, 0, rd, resp);
    check(resp == 0 && rd == 16'h1234, "single-cycle read");
    vme_data_phase(0, 2'b11, 0, rd, resp);
    check(resp == 2, "second data phase under a single-cycle AM ignored");
    vme_as_n = 1'b1; #100;
    check(starts - s0 == 1, "one access only");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
