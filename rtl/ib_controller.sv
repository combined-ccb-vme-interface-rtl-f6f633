// ib_controller: master of the board's internal downloading/readout bus.
//
// The VME slave hands over one 16-bit access at a time (start pulse with
// word address, write data, byte enables and direction). The controller
// decodes the address (vme_addr_decoder) and runs the access:
//   * the interface FPGA's own registers answer in the next cycle;
//   * a Front FPGA or the Main FPGA gets its active-low chip enable (CE*),
//     the region-relative address, the write data and a write or output
//     enable for WAIT_CYCLES clock cycles; read data is sampled from the
//     shared bus in the last of them, then CE* is released;
//   * an address in no region ends at once with err (the slave turns that
//     into a VME bus error).
// The proposal names the shared bus and one CE* line per destination; the
// fixed wait-state timing is this design's choice (the proposal gives no
// bus timing). One access is in flight at a time; start is ignored while busy.
module ib_controller
  import ccb_vme_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 4,   // CE* width for external FPGAs
  parameter int unsigned OFS_W       = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the VME slave
  input  logic              start,
  input  logic [OFS_W-1:1]  addr,       // word address in the board window
  input  logic [15:0]       wdata,
  input  logic [1:0]        be,         // [1] D15..D8, [0] D7..D0
  input  logic              we,
  output logic              ack,        // one-cycle, access done
  output logic              err,        // one-cycle, no destination
  output logic [15:0]       rdata,      // valid with ack
  // own register file
  output logic              reg_sel,
  output logic              reg_we,
  output logic [6:0]        reg_addr,
  output logic [15:0]       reg_wdata,
  output logic [1:0]        reg_be,
  input  logic [15:0]       reg_rdata,
  // external FPGAs
  output logic [N_FPGA-1:0] ext_ce_n,   // [0..4] Front, [5] Main
  output logic [OFS_W-1:1]  ext_addr,
  output logic [15:0]       ext_wdata,
  output logic [1:0]        ext_be,
  output logic              ext_we,
  output logic              ext_oe,
  input  logic [15:0]       ext_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_EXT, S_DONE} state_e;
  state_e state;

  logic [N_DEST-1:0] sel;
  logic              hit;
  logic [OFS_W-1:0]  rel;
  logic [$clog2(WAIT_CYCLES+1)-1:0] cnt;

  vme_addr_decoder #(.OFS_W(OFS_W)) u_dec (
    .offset({addr, 1'b0}), .sel(sel), .hit(hit), .rel(rel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      ack       <= 1'b0;
      err       <= 1'b0;
      rdata     <= '0;
      reg_sel   <= 1'b0;
      reg_we    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_be    <= '0;
      ext_ce_n  <= '1;
      ext_addr  <= '0;
      ext_wdata <= '0;
      ext_be    <= '0;
      ext_we    <= 1'b0;
      ext_oe    <= 1'b0;
    end else begin
      ack     <= 1'b0;
      err     <= 1'b0;
      reg_sel <= 1'b0;
      reg_we  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (!hit) begin
            err <= 1'b1;
          end else if (sel[DEST_REGS]) begin
            reg_sel   <= 1'b1;
            reg_we    <= we;
            reg_addr  <= rel[7:1];
            reg_wdata <= wdata;
            reg_be    <= be;
            state     <= S_DONE;
          end else begin
            ext_ce_n  <= ~sel[DEST_MAIN:DEST_FRONT];
            ext_addr  <= rel[OFS_W-1:1];
            ext_wdata <= wdata;
            ext_be    <= be;
            ext_we    <= we;
            ext_oe    <= ~we;
            cnt       <= ($clog2(WAIT_CYCLES+1))'(WAIT_CYCLES - 1);
            state     <= S_EXT;
          end
        end
        S_DONE: begin             // register file answers combinationally
          rdata <= reg_rdata;
          ack   <= 1'b1;
          state <= S_IDLE;
        end
        S_EXT: begin
          if (cnt == 0) begin
            rdata    <= ext_oe ? ext_rdata : 16'h0000;
            ack      <= 1'b1;
            ext_ce_n <= '1;
            ext_we   <= 1'b0;
            ext_oe   <= 1'b0;
            state    <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one destination enabled at a time.
  a_one_ce: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(~ext_ce_n));
  a_ack_err: assert property (@(posedge clk) disable iff (!rst_n) !(ack && err));

endmodule
