// Self-checking testbench for ccb_cmd_decoder.
// Sends 300 random commands and data words on the CCB buses, each with a
// one-cycle strobe, with random idle gaps and changing (unstrobed) values in
// between. Checks that cmd_valid/data_valid follow each strobe by exactly
// two clocks with the strobed value, that the captured values hold between
// strobes, that the counters count strobes, and that the parameter-listed
// command codes (two are enabled here) raise their hit lines only for their
// own codes.
module tb_ccb_cmd_decoder;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;

  logic [5:0] ccb_cmd, cmd;
  logic       ccb_cmd_strobe, ccb_data_strobe, cmd_valid, data_valid;
  logic [7:0] ccb_data, data, cmd_cnt, data_cnt;
  logic [3:0] cmd_hit;

  ccb_cmd_decoder #(.N_HIT(4), .HIT_CODES({6'h3F, 6'h3F, 6'h12, 6'h05}),
                    .HIT_MASK(4'b0011)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected pipeline, two cycles deep
  logic       cs_d [2], ds_d [2];
  logic [5:0] c_d [2];
  logic [7:0] d_d [2];
  logic [5:0] c_last = 0;
  logic [7:0] d_last = 0;
  int n_c = 0, n_d = 0, hits = 0;

  initial begin
    ccb_cmd = 0; ccb_data = 0; ccb_cmd_strobe = 0; ccb_data_strobe = 0;
    for (int i = 0; i < 2; i++) begin cs_d[i] = 0; ds_d[i] = 0; c_d[i] = 0; d_d[i] = 0; end
    #60 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(cmd_valid == cs_d[1] && data_valid == ds_d[1], $sformatf("valid timing at %0d", cyc));
      if (cs_d[1]) begin
        c_last = c_d[1]; n_c++;
        check(cmd_hit == {2'b00, c_d[1] == 6'h12, c_d[1] == 6'h05}, "command hit lines");
        if (cmd_hit != 0) hits++;
      end else begin
        check(cmd_hit == 0, "no hit without a command");
      end
      if (ds_d[1]) begin d_last = d_d[1]; n_d++; end
      check(cmd == c_last && data == d_last, "captured values");
      check(cmd_cnt == 8'(n_c) && data_cnt == 8'(n_d), "strobe counters");
      cs_d[1] = cs_d[0]; ds_d[1] = ds_d[0]; c_d[1] = c_d[0]; d_d[1] = d_d[0];
      ccb_cmd_strobe  = ($urandom_range(0, 9) == 0);
      ccb_data_strobe = ($urandom_range(0, 9) == 0);
      ccb_cmd  = ($urandom_range(0, 3) == 0) ? 6'(5 + 13 * $urandom_range(0, 1)) : 6'($urandom);
      ccb_data = 8'($urandom);
      cs_d[0] = ccb_cmd_strobe; ds_d[0] = ccb_data_strobe; c_d[0] = ccb_cmd; d_d[0] = ccb_data;
    end
    check(hits > 0, "hit lines exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
