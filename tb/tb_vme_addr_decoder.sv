// Self-checking testbench for vme_addr_decoder.
// Every region boundary and 2000 random offsets are decoded and compared
// with an independent reference built from the address map: registers at
// 0x00000-0x000FF, Front FPGA i at 0x100*(i+1) for 0x100 bytes, Main FPGA at
// 0x40000-0x7FFFF, nothing elsewhere.
module tb_vme_addr_decoder;
  import ccb_vme_pkg::*;

  logic [18:0]       offset, rel;
  logic [N_DEST-1:0] sel;
  logic              hit;

  vme_addr_decoder dut (.*);

  int checks = 0, failures = 0;

  task automatic ref_model(input logic [18:0] o, output logic [6:0] s,
                           output logic h, output logic [18:0] r);
    s = '0; r = '0;
    if (o < 19'h100) begin s = 7'b0000001; r = o; end
    else if (o < 19'h600) begin
      s = 7'b1 << (o >> 8);
      r = {11'b0, o[7:0]};
    end
    else if (o >= 19'h40000) begin s = 7'b1000000; r = o - 19'h40000; end
    h = |s;
  endtask

  task automatic try(input logic [18:0] o);
    logic [6:0] es; logic eh; logic [18:0] er;
    offset = o;
    #1;
    ref_model(o, es, eh, er);
    checks++;
    if (sel !== es || hit !== eh || (eh && rel !== er)) begin
      failures++;
      $display("FAIL: offset %h sel %b/%b hit %b/%b rel %h/%h", o, sel, es, hit, eh, rel, er);
    end
  endtask

  initial begin
    automatic logic [18:0] edges [] = '{19'h0, 19'hFF, 19'h100, 19'h1FE, 19'h200,
      19'h2FF, 19'h300, 19'h3FF, 19'h400, 19'h4FF, 19'h500, 19'h5FF, 19'h600,
      19'h3FFFF, 19'h40000, 19'h40002, 19'h7FFFF};
    foreach (edges[i]) try(edges[i]);
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0) try(19'($urandom_range(0, 'h7FF)));
      else            try(19'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
