// ew_delay: delays the event-window signal by DELAY clocks with a chain
// of flip-flops and nothing else. The design lists such a block with 25
// flip-flops and no logic, read here as a 25-stage delay; what the delay
// aligns the window with is not stated, so the length is a parameter.
// Output ew_out(t) = ew_in(t - DELAY); the chain resets to 0.
module ew_delay #(
  parameter int unsigned DELAY = 25
) (
  input  logic clk,
  input  logic rst,
  input  logic ew_in,
  output logic ew_out
);

  logic [DELAY-1:0] chain;

  always_ff @(posedge clk) begin
    if (rst) chain <= '0;
    else     chain <= {chain[DELAY-2:0], ew_in};
  end

  assign ew_out = chain[DELAY-1];

endmodule
