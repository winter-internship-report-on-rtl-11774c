// mu_dff: D flip-flop. On each rising clock edge q takes d, or 0 when reset
// is high (synchronous, active-high reset).
module mu_dff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

endmodule
