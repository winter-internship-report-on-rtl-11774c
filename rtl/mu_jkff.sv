// mu_jkff: JK flip-flop with complementary output. On each rising clock edge:
// j k = 00 hold, 01 reset, 10 set, 11 toggle. qb is always ~q. A synchronous
// active-high reset (rst) is this design's addition so the state starts known.
module mu_jkff (
  input  logic clk,
  input  logic rst,
  input  logic j,
  input  logic k,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        default: q <= ~q;
      endcase
    end
  end

  assign qb = ~q;

endmodule
