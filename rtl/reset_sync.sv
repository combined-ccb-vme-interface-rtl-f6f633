// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain. rst_n_out falls at once when rst_n_in falls and rises STAGES
// clocks after rst_n_in has risen. A standard reset synchronizer, used
// for the system-clock domain; the interface specification says nothing about
// reset inside the FPGA.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n_in)
    if (!rst_n_in) sr <= '0;
    else           sr <= {sr[STAGES-2:0], 1'b1};

  assign rst_n_out = sr[STAGES-1];

endmodule
