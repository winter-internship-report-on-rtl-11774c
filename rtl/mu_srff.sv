// mu_srff: clocked (gated) SR latch, the behaviour of four cross-coupled NAND
// gates with the clock gating s and r.
// While clk is high the latch is transparent: s = 1 sets q, r = 1 resets it,
// s = r = 1 drives both q and qbar high (what the NAND pair does), s = r = 0
// holds. While clk is low it holds. After s = r = 1 is released the previous
// state is kept (in the gate circuit it is undefined). It is written as a
// level-sensitive latch on purpose: that is what the circuit is.
module mu_srff (
  input  logic clk,
  input  logic s,
  input  logic r,
  output logic q,
  output logic qbar
);

  logic state;
  logic both;

  always_latch begin
    if (clk && (s ^ r)) state = s;
  end

  assign both = clk && s && r;
  assign q    = both | state;
  assign qbar = both | ~state;

endmodule
