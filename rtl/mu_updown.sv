// mu_updown: W-bit up/down counter (W = 4). On each rising clock edge it counts
// up when up_high = 1 (wrapping from 15 to 0) and down otherwise (wrapping from
// 0 to 15). Synchronous, active-high reset clears it.
module mu_updown #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         up_high,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset)        count <= '0;
    else if (up_high) count <= count + 1'b1;
    else              count <= count - 1'b1;
  end

endmodule
