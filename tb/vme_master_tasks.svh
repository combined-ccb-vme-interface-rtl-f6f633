// VME bus master tasks for the testbenches (A24/D16, single cycles and BLT).
// Included inside a testbench module that declares the VME signals
// vme_as_n, vme_ds_n, vme_write_n, vme_lword_n, vme_iack_n, vme_am, vme_a,
// vme_d_in (master to slave), vme_d_out/vme_d_oe (slave to master),
// vme_dtack_n, vme_berr_n. Timing in ns: address 40 ns before AS*, data
// strobes 20 ns after AS*, a cycle that gets no DTACK*/BERR* within 3 us is
// reported as a timeout (resp = 2). resp: 0 DTACK*, 1 BERR*, 2 timeout.

task automatic vme_idle();
  vme_as_n    = 1'b1;
  vme_ds_n    = 2'b11;
  vme_write_n = 1'b1;
  vme_lword_n = 1'b1;
  vme_iack_n  = 1'b1;
  vme_am      = 6'h00;
  vme_a       = '0;
  vme_d_in    = '0;
endtask

// one data phase under an already asserted AS*
task automatic vme_data_phase(input logic write, input logic [1:0] lanes,
                              input logic [15:0] wdata,
                              output logic [15:0] rdata, output int resp);
  int n;
  vme_write_n = ~write;
  vme_d_in    = wdata;
  #20 vme_ds_n = ~lanes;
  resp = 2;
  rdata = '0;
  for (n = 0; n < 300; n++) begin
    #10;
    if (!vme_dtack_n || !vme_berr_n) break;
  end
  if (!vme_dtack_n)     resp = 0;
  else if (!vme_berr_n) resp = 1;
  if (resp == 0 && !write) begin
    if (!vme_d_oe) resp = 3;       // DTACK* without data driven
    rdata = vme_d_out;
  end
  #5 vme_ds_n = 2'b11;
  for (n = 0; n < 300; n++) begin
    if (vme_dtack_n && vme_berr_n) break;
    #10;
  end
endtask

task automatic vme_cycle(input logic [5:0] am, input logic [23:0] addr,
                         input logic write, input logic [1:0] lanes,
                         input logic [15:0] wdata,
                         output logic [15:0] rdata, output int resp);
  vme_am    = am;
  vme_a     = addr[23:1];
  #40 vme_as_n = 1'b0;
  vme_data_phase(write, lanes, wdata, rdata, resp);
  vme_as_n = 1'b1;
  #40;
endtask
