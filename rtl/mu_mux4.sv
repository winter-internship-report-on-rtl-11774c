// mu_mux4: 4-to-1 multiplexer of W-bit words (W = 4).
// y follows a, b, c or d for sel = 0, 1, 2, 3. Purely combinational.
module mu_mux4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [1:0]   sel,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd0:    y = a;
      2'd1:    y = b;
      2'd2:    y = c;
      default: y = d;
    endcase
  end

endmodule
