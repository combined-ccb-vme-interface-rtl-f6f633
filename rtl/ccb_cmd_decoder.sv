// ccb_cmd_decoder: capture of the CCB fast-control command and data buses.
//
// The CCB puts a 6-bit command on CCB_CMD[5..0] with a 25 ns CCB_CMD_STROBE,
// and an 8-bit word on CCB_DATA[7..0] with CCB_DATA_STROBE (levels and
// strobes per the backplane signal list). This block registers both buses,
// captures each on its strobe, counts the strobes (the last values and the
// counts are readable from VME), and forwards each captured command as a
// one-cycle cmd_valid with its code towards the sector-processor FPGAs.
// The proposal states that commands related to SP timing control will be
// decoded here but leaves the command set to be specified; codes matching
// parameter-listed values raise one-cycle hit lines, and the list defaults
// to no codes (all entries 6'h3F and disabled by HIT_MASK).
//
// Timing: inputs are registered once; captured values and cmd_valid appear
// two clocks after the strobe.
module ccb_cmd_decoder #(
  parameter int unsigned  N_HIT = 4,
  parameter logic [23:0]  HIT_CODES = 24'hFFFFFF,  // N_HIT codes of 6 bits, entry 0 lowest
  parameter logic [3:0]   HIT_MASK  = 4'b0000      // entries in use
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [5:0]       ccb_cmd,
  input  logic             ccb_cmd_strobe,
  input  logic [7:0]       ccb_data,
  input  logic             ccb_data_strobe,
  output logic             cmd_valid,
  output logic [5:0]       cmd,
  output logic [7:0]       cmd_cnt,
  output logic             data_valid,
  output logic [7:0]       data,
  output logic [7:0]       data_cnt,
  output logic [N_HIT-1:0] cmd_hit
);

  logic [5:0] cmd_q;
  logic [7:0] data_q;
  logic       cstb_q, dstb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q      <= '0;
      data_q     <= '0;
      cstb_q     <= 1'b0;
      dstb_q     <= 1'b0;
      cmd_valid  <= 1'b0;
      cmd        <= '0;
      cmd_cnt    <= '0;
      data_valid <= 1'b0;
      data       <= '0;
      data_cnt   <= '0;
      cmd_hit    <= '0;
    end else begin
      cmd_q      <= ccb_cmd;
      data_q     <= ccb_data;
      cstb_q     <= ccb_cmd_strobe;
      dstb_q     <= ccb_data_strobe;
      cmd_valid  <= cstb_q;
      data_valid <= dstb_q;
      cmd_hit    <= '0;
      if (cstb_q) begin
        cmd     <= cmd_q;
        cmd_cnt <= cmd_cnt + 1'b1;
        for (int i = 0; i < N_HIT; i++)
          cmd_hit[i] <= HIT_MASK[i] && (HIT_CODES[6*i +: 6] == cmd_q);
      end
      if (dstb_q) begin
        data     <= data_q;
        data_cnt <= data_cnt + 1'b1;
      end
    end
  end

endmodule
