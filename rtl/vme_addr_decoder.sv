// vme_addr_decoder: splits the board's internal address space between the
// destinations on the downloading/readout bus.
//
// Each sector-processor board owns 2^19 bytes of the VME A24 space (the top
// five address bits are its slot number). Within that window the interface
// FPGA's own registers, the five Front FPGAs and the Main FPGA share one
// internal address space. Following the proposal, each Front FPGA occupies
// 0x100 bytes. The proposal leaves the placement of the regions open (and the
// size of the Main FPGA and register regions); this design puts the
// registers at 0x00000, Front FPGA i at 0x100*(i+1) and gives the Main FPGA
// the upper half of the window (0x40000-0x7FFFF), all set by parameters.
//
// Purely combinational: byte offset in, one-hot destination select, a hit
// flag and the byte offset relative to the start of the selected region out.
// An offset inside no region gives hit = 0 and an all-zero select.
module vme_addr_decoder
  import ccb_vme_pkg::*;
#(
  parameter int unsigned OFS_W      = 19,        // bits of the board window
  parameter int unsigned REGS_BASE  = 'h00000,
  parameter int unsigned REGS_SIZE  = 'h00100,
  parameter int unsigned FRONT_BASE = 'h00100,   // Front FPGA 0
  parameter int unsigned FRONT_SIZE = 'h00100,   // per Front FPGA
  parameter int unsigned MAIN_BASE  = 'h40000,
  parameter int unsigned MAIN_SIZE  = 'h40000
) (
  input  logic [OFS_W-1:0]  offset,   // byte offset in the board window
  output logic [N_DEST-1:0] sel,      // one-hot: [0] registers, [1..5] Front, [6] Main
  output logic              hit,
  output logic [OFS_W-1:0]  rel       // byte offset inside the selected region
);

  always_comb begin
    sel = '0;
    rel = '0;
    if (32'(offset) >= REGS_BASE && 32'(offset) < REGS_BASE + REGS_SIZE) begin
      sel[DEST_REGS] = 1'b1;
      rel = OFS_W'(32'(offset) - REGS_BASE);
    end
    for (int unsigned i = 0; i < N_FRONT; i++) begin
      if (32'(offset) >= FRONT_BASE + i*FRONT_SIZE &&
          32'(offset) <  FRONT_BASE + (i+1)*FRONT_SIZE) begin
        sel[DEST_FRONT+i] = 1'b1;
        rel = OFS_W'(32'(offset) - (FRONT_BASE + i*FRONT_SIZE));
      end
    end
    if (32'(offset) >= MAIN_BASE && 32'(offset) < MAIN_BASE + MAIN_SIZE) begin
      sel[DEST_MAIN] = 1'b1;
      rel = OFS_W'(32'(offset) - MAIN_BASE);
    end
    hit = |sel;
  end

endmodule
