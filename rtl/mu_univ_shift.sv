// mu_univ_shift: 4-bit serial-in shift register that shifts either way.
// On each rising clock edge, with right_sel = 1 the register shifts right and
// din enters bit 3; with right_sel = 0 it shifts left and din enters bit 0.
// s_left = dout[0] and s_right = dout[3] are the serial outputs. Synchronous,
// active-high reset clears the register.
module mu_univ_shift (
  input  logic       clk,
  input  logic       reset,
  input  logic       right_sel,
  input  logic       din,
  output logic [3:0] dout,
  output logic       s_left,
  output logic       s_right
);

  always_ff @(posedge clk) begin
    if (reset)          dout <= 4'd0;
    else if (right_sel) dout <= {din, dout[3:1]};
    else                dout <= {dout[2:0], din};
  end

  assign s_left  = dout[0];
  assign s_right = dout[3];

endmodule
