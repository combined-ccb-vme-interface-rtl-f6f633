// vme_slave: A24/D16 VME slave of the combined CCB-VME interface FPGA.
//
// The board answers the six A24 address modifiers of the proposal (data and
// program, non-privileged and supervisory, and the two block-transfer codes).
// Its 2^19-byte window is chosen by the five geographical-address lines of
// its slot: A23..A19 must equal the slot number GA4..GA0. Only 16-bit
// transfers are served (LWORD* high); byte accesses use DS1* (D15..D8) and
// DS0* (D7..D0). Interrupt-acknowledge cycles are ignored.
//
// Operation, all in the system clock domain:
//   * AS*, DS1* and DS0* pass through two-flop synchronizers. When AS* is
//     seen low, the address, AM code, LWORD* and IACK* are taken (they are
//     stable for the whole address phase) and the board decides whether it
//     is addressed. Geographical address parity (GAP*) is checked too.
//   * When a data strobe has been seen low in two successive cycles, the
//     write data and byte lanes are taken and one access is started on the
//     internal bus. On its ack the slave drives read data for one cycle, then
//     asserts DTACK* (BERR* instead when the address hit no destination) and
//     holds it until both data strobes are released.
//   * In a block transfer the word address advances by 2 bytes after each
//     data cycle and further data cycles follow under the same AS*.
// DTACK*, BERR* and the data bus are modelled as an active-low level plus an
// output enable for the board's open-collector / three-state drivers. A
// single cycle takes about 8 clock cycles plus the internal access time.
// The bus handshake follows the VME standard; the synchronizer depth and the
// data-before-DTACK cycle are this design's choices.
module vme_slave
  import ccb_vme_pkg::*;
#(
  parameter int unsigned OFS_W = 19   // board window: A18..A0
) (
  input  logic              clk,
  input  logic              rst_n,
  // VME backplane (after the bus transceivers)
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,     // {DS1*, DS0*}
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
  // internal bus
  output logic              ib_start,
  output logic [OFS_W-1:1]  ib_addr,
  output logic [15:0]       ib_wdata,
  output logic [1:0]        ib_be,
  output logic              ib_we,
  input  logic              ib_ack,
  input  logic              ib_err,
  input  logic [15:0]       ib_rdata,
  // status
  output logic              selected      // board addressed in this cycle
);

  typedef enum logic [2:0] {
    S_IDLE, S_DECIDE, S_WAIT_DS, S_ACCESS, S_DRIVE, S_ACK, S_IGNORE
  } state_e;
  state_e state;

  logic [1:0] as_sync;              // [0] first stage, [1] synchronized
  logic [1:0] ds_sync0, ds_sync1;
  logic       ds_any_d;
  logic       as_act, ds_any, ds_none;
  logic       blt, bus_err;
  logic [5:0] am_q;
  logic [23:1] a_q;
  logic       lword_n_q, iack_n_q;

  assign as_act  = as_sync[1];
  assign ds_any  = |ds_sync1;
  assign ds_none = ~|ds_sync1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= '0;
      ds_sync0 <= '0;
      ds_sync1 <= '0;
      ds_any_d <= 1'b0;
    end else begin
      as_sync  <= {as_sync[0], ~vme_as_n};
      ds_sync0 <= ~vme_ds_n;
      ds_sync1 <= ds_sync0;
      ds_any_d <= ds_any;
    end
  end

  // Board-select decision, evaluated on the latched address phase.
  logic ga_ok, am_ok, match;
  assign ga_ok = (a_q[23:19] == ~vme_ga_n) && (^{vme_ga_n, vme_gap_n} == 1'b1);
  assign am_ok = am_is_a24(am_q);
  assign match = ga_ok && am_ok && lword_n_q && iack_n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      am_q        <= '0;
      a_q         <= '0;
      lword_n_q   <= 1'b1;
      iack_n_q    <= 1'b1;
      blt         <= 1'b0;
      bus_err     <= 1'b0;
      ib_start    <= 1'b0;
      ib_addr     <= '0;
      ib_wdata    <= '0;
      ib_be       <= '0;
      ib_we       <= 1'b0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      vme_berr_n  <= 1'b1;
      selected    <= 1'b0;
    end else begin
      ib_start <= 1'b0;
      unique case (state)
        S_IDLE: if (as_act) begin
          am_q      <= vme_am;
          a_q       <= vme_a;
          lword_n_q <= vme_lword_n;
          iack_n_q  <= vme_iack_n;
          state     <= S_DECIDE;
        end
        S_DECIDE: begin
          if (match) begin
            blt      <= am_is_blt(am_q);
            ib_addr  <= a_q[OFS_W-1:1];
            selected <= 1'b1;
            state    <= S_WAIT_DS;
          end else begin
            state <= S_IGNORE;
          end
        end
        S_WAIT_DS: begin
          if (!as_act) begin
            selected <= 1'b0;
            state    <= S_IDLE;
          end else if (ds_any && ds_any_d) begin
            ib_wdata <= vme_d_in;
            ib_be    <= ds_sync1;
            ib_we    <= ~vme_write_n;
            ib_start <= 1'b1;
            state    <= S_ACCESS;
          end
        end
        S_ACCESS: begin
          if (ib_ack || ib_err) begin
            bus_err   <= ib_err;
            vme_d_out <= ib_rdata;
            vme_d_oe  <= ib_ack && !ib_we;
            state     <= S_DRIVE;
          end
        end
        S_DRIVE: begin            // data on the bus one cycle ahead of DTACK*
          vme_dtack_n <= bus_err;
          vme_berr_n  <= ~bus_err;
          state       <= S_ACK;
        end
        S_ACK: begin
          if (ds_none) begin
            vme_dtack_n <= 1'b1;
            vme_berr_n  <= 1'b1;
            vme_d_oe    <= 1'b0;
            if (blt) ib_addr <= ib_addr + 1'b1;
            if (blt && as_act && !bus_err) begin
              state <= S_WAIT_DS;
            end else begin
              selected <= 1'b0;
              state    <= as_act ? S_IGNORE : S_IDLE;
            end
          end
        end
        S_IGNORE: if (!as_act) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_dtack_berr: assert property (@(posedge clk) disable iff (!rst_n)
    !(!vme_dtack_n && !vme_berr_n));
  a_oe_read: assert property (@(posedge clk) disable iff (!rst_n)
    vme_d_oe |-> !ib_we);

endmodule
