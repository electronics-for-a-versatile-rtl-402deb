// reset_sync: system reset generation.
//
// The board holds the FPGA's asynchronous reset input low at power-up
// until a slow RC filter on the 3.3 V supply, squared up by Schmitt-trigger
// inverters, rises (about 0.6 s). A reset command received over the UART
// must also reset the whole system. This module merges the two: arst_n
// asserts the output reset immediately (asynchronously); 'soft_req', a
// one-clock pulse from the command parser, asserts it on the next clock
// edge. Either way the release is synchronised to clk and happens STAGES
// clocks after the cause has gone, so every flop leaves reset in the same
// cycle. The synchroniser itself is this design's addition.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  input  logic soft_req,
  output logic rst_n
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)       sr <= '0;
    else if (soft_req) sr <= '0;
    else               sr <= {sr[STAGES-2:0], 1'b1};
  end

  assign rst_n = sr[STAGES-1];

endmodule
