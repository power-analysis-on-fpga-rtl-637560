// reset_sync: brings the external reset into the clock domain.
//
// The raw reset asserts the output at once (asynchronously); release passes
// through STAGES flip-flops, so the design leaves reset on a clock edge and
// a metastable input has a full cycle to settle. Two stages follow the
// design; asynchronous assertion is this implementation's choice.
//
// Interface: rst_in (active high, any time) -> rst_out (active high).
// Timing: rst_out falls STAGES clock edges after rst_in falls.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) sr <= '1;
    else        sr <= {sr[STAGES-2:0], 1'b0};
  end

  assign rst_out = sr[STAGES-1];

endmodule
