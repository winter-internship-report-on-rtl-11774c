// mu_demux4: 1-to-4 demultiplexer of a W-bit word (W = 4).
// din appears on the output selected by sel (y0..y3 for sel = 0..3); the other
// three outputs are 0. Purely combinational. Every select value routes to its
// own output, as a demultiplexer does.
module mu_demux4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] din,
  input  logic [1:0]   sel,
  output logic [W-1:0] y0,
  output logic [W-1:0] y1,
  output logic [W-1:0] y2,
  output logic [W-1:0] y3
);

  assign y0 = (sel == 2'd0) ? din : '0;
  assign y1 = (sel == 2'd1) ? din : '0;
  assign y2 = (sel == 2'd2) ? din : '0;
  assign y3 = (sel == 2'd3) ? din : '0;

endmodule
