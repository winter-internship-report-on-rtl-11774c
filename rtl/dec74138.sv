// dec74138: 3-to-8 line decoder with the behaviour of the 74138.
// When enabled (e1_n = 0, e2_n = 0, e3 = 1) the output selected by {a, b, c}
// (a is the most significant bit) goes low and the other seven stay high; when
// not enabled all eight outputs are high. Purely combinational.
module dec74138 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic       e1_n,
  input  logic       e2_n,
  input  logic       e3,
  output logic [7:0] y_n
);

  logic en;
  assign en  = !e1_n && !e2_n && e3;
  assign y_n = en ? ~(8'd1 << {a, b, c}) : 8'hFF;

endmodule
