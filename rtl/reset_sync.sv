// reset_sync: reset synchronizer for one clock domain.
//
// The reset is asserted asynchronously as soon as arst rises and released
// synchronously, STAGES clock edges after arst falls, so every flip-flop of
// the domain leaves reset on the same edge.  This helper is this design's
// own; it brings the system reset into the Clk_B domain of the coherent
// sampler and builds the system reset from the MMCM lock signals.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst,   // asynchronous, active high
  output logic rst     // synchronous release, active high
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) chain <= '1;
    else      chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign rst = chain[STAGES-1];
endmodule
