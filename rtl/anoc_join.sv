// anoc_join: the join of the asynchronous router. Two left channels compete
// for one right channel; a mutual-exclusion element (ME) lets one of them in
// at a time, a 2:1 multiplexer selects its data and a latch holds the word
// for the right channel.
//
// Protocol, after the join specification: the ME grants a left channel; the
// granted request lv_i meets a finished right cycle in event c; then la_i and
// rv rise concurrently; la_i falls after lv_i falls; rv falls after ra rises.
// The ME keeps its grant until la_i has fallen, so the other channel starts
// only after the current left cycle is complete. The right side may still be
// finishing (ra) when the next channel is granted; the next c waits for it.
//
// Realisation (this design's own, equivalent to that specification): the
// controller is the linear FIFO controller (see fifo_linear_cell) driven by
// lv = (g1 & mlv1) | (g2 & mlv2), with la1 = la & g1, la2 = la & g2. The ME
// (anoc_mutex) request of channel i is mlv_i | la_i. The data latch is
// transparent while la and rv are low. Handshake gates carry a delay GD
// (ignored by synthesis); their feedback is their state-holding function.
// Lint: Verilator reports NOLATCH on the data latch below; synthesis infers a
// transparent latch for it, and simulation holds the word while the enable is
// low, so the warning stands.
module anoc_join #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  // left channel 1
  input  logic         mlv1,
  output logic         la1,
  input  logic [W-1:0] din1,
  // left channel 2
  input  logic         mlv2,
  output logic         la2,
  input  logic [W-1:0] din2,
  // right channel
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  logic [1:0] grant;   // ME grants, bit 0 = channel 1
  logic       lv;      // request of the granted channel
  logic       la, t;

  anoc_mutex #(.GD(GD)) u_me (.rst, .req({mlv2 || la2, mlv1 || la1}), .grant);

  assign lv  = (grant[0] && mlv1) || (grant[1] && mlv2);
  assign la1 = la && grant[0];
  assign la2 = la && grant[1];

  anoc_gc #(.GD(GD)) u_t  (.rst, .set(lv && !la && !rv && !ra), .clr(la && rv),  .q(t));
  anoc_gc #(.GD(GD)) u_la (.rst, .set(t),                         .clr(!lv && !t), .q(la));
  anoc_gc #(.GD(GD)) u_rv (.rst, .set(t && !ra),                  .clr(ra && !t),  .q(rv));

  always_latch begin
    if (!la && !rv) dout = grant[1] ? din2 : din1;
  end

endmodule
