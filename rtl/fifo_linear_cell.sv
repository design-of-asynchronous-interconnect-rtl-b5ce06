// fifo_linear_cell: one stage of a self-timed flow-through FIFO, a four-phase
// controller plus a W-bit data latch.
//
// The controller follows the two-process specification of the linear FIFO
// cell: the left process (lv up, la up, lv down, la down) and the right
// process (rv up, ra up, rv down, ra down) meet in one synchronising event c,
// which needs a request on the left and a finished right cycle (rv and ra
// both low). After c, la and rv rise concurrently, so a stage acknowledges
// its input while its output is still waiting: a chain of N cells holds N
// words.
//
// Realisation (this design's own): c is an internal state signal t, set by
// lv & ~la & ~rv & ~ra and cleared once both la and rv have risen. la is set
// by t and cleared by ~lv & ~t; rv is set by t & ~ra and cleared by ra & ~t.
// Each is a set/reset gate (generalised C-element, anoc_gc); the feedback
// loops are the state-holding gates of the asynchronous controller. The
// circuit is speed independent. Each gate carries a propagation delay of GD
// time units, which synthesis ignores and which gives simulation a definite
// order of events.
//
// The data latch is transparent while la and rv are both low and closes as
// soon as either rises. It has no delay, so dout settles before rv rises
// (bundled data) and holds until the stage is empty again. The original cell
// closes its latch with la alone; also holding it closed while rv is up
// keeps the word safe when la has already fallen but ra has not yet risen.
// rst (active high, not part of the original) clears every gate; keep lv
// low while it is applied and for GD after.
// Lint: Verilator reports NOLATCH on the data latch below; synthesis infers a
// transparent latch for it, and simulation holds the word while the enable is
// low, so the warning stands.
module fifo_linear_cell #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  // left (input) channel
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  // right (output) channel
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  logic t;   // synchronising event c has fired, la and rv not both up yet

  anoc_gc #(.GD(GD)) u_t  (.rst, .set(lv && !la && !rv && !ra), .clr(la && rv),  .q(t));
  anoc_gc #(.GD(GD)) u_la (.rst, .set(t),                         .clr(!lv && !t), .q(la));
  anoc_gc #(.GD(GD)) u_rv (.rst, .set(t && !ra),                  .clr(ra && !t),  .q(rv));

  always_latch begin
    if (!la && !rv) dout = din;
  end

endmodule
