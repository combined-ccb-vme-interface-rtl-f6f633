// ccb_vme_pkg: constants and types shared by the combined CCB-VME interface.
//
// The board carries five Front FPGAs (one per muon-chamber group 4, 3, 2,
// 1B and 1A) and one Main (sector-processor) FPGA; together they are the
// Virtex devices that receive the fanned-out timing signals and that are
// reprogrammed by a hard reset. The VME slave answers the six A24
// address-modifier codes listed below. The register offsets of the
// interface FPGA itself, and the numbering of the destinations, are this
// design's own choices; the counts and the modifier codes follow the
// proposal.
package ccb_vme_pkg;

  // Virtex FPGAs served by the interface FPGA.
  localparam int unsigned N_FRONT = 5;            // Front FPGAs
  localparam int unsigned N_FPGA  = N_FRONT + 1;  // plus the Main FPGA (index N_FRONT)

  // Internal downloading/readout bus destinations (one-hot select order).
  localparam int unsigned N_DEST  = N_FPGA + 1;   // own registers, Front 0..4, Main
  localparam int unsigned DEST_REGS  = 0;
  localparam int unsigned DEST_FRONT = 1;         // Front FPGA i is DEST_FRONT + i
  localparam int unsigned DEST_MAIN  = DEST_FRONT + N_FRONT;

  // A24 address modifiers answered by the slave.
  localparam logic [5:0] AM_A24_NP_DATA  = 6'h39;
  localparam logic [5:0] AM_A24_NP_PROG  = 6'h3A;
  localparam logic [5:0] AM_A24_SUP_DATA = 6'h3D;
  localparam logic [5:0] AM_A24_SUP_PROG = 6'h3E;
  localparam logic [5:0] AM_A24_NP_BLT   = 6'h3B;
  localparam logic [5:0] AM_A24_SUP_BLT  = 6'h3F;

  function automatic logic am_is_a24(input logic [5:0] am);
    return am inside {AM_A24_NP_DATA, AM_A24_NP_PROG, AM_A24_SUP_DATA,
                      AM_A24_SUP_PROG, AM_A24_NP_BLT, AM_A24_SUP_BLT};
  endfunction

  function automatic logic am_is_blt(input logic [5:0] am);
    return am inside {AM_A24_NP_BLT, AM_A24_SUP_BLT};
  endfunction

  // The four CCB timing pulses that are fanned out to every Virtex FPGA.
  typedef struct packed {
    logic l1accept;
    logic bx0;
    logic bcntres;
    logic evcntres;
  } ttc_pulses_t;

  // Word offsets (byte offset / 2) of the interface FPGA's own registers.
  typedef enum logic [6:0] {
    REG_CSR      = 7'h00,  // RW  [0] force oscillator, [1] pass CCB pulses, [2] pass VME pulses
    REG_TTC      = 7'h01,  // WO  [3:0] one-shot pulses {L1A, BX0, BCNTRES, EVCNTRES}
    REG_RECONFIG = 7'h02,  // WO  [N_FPGA-1:0] program pulse per FPGA
    REG_STATUS   = 7'h03,  // RO  clock and CCB status
    REG_DONE     = 7'h04,  // RO  [5:0] DONE, [13:8] INIT
    REG_CCB_CMD  = 7'h05,  // RO  [5:0] last command, [15:8] command count
    REG_CCB_DATA = 7'h06,  // RO  [7:0] last data, [15:8] data count
    REG_JTAG     = 7'h07,  // RW  [0] TCK, [1] TMS, [2] TDI, [3] TDO (RO)
    REG_COUNT    = 7'h08   // RO  [7:0] L1Accepts sent, [15:8] hard resets seen
  } reg_addr_e;

endpackage
