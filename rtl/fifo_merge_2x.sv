// fifo_merge_2x: a FIFO stage with two input channels and one output
// channel that collects words in a repeating pattern of three: one word from
// input 0, then two from input 1. It collects the words along the bottom row
// of the square FIFO. START (0, 1 or 2) is the position after reset.
//
// The order is fixed, not arbitrated: a request on the input that is not due
// waits. Protocol, after the merge specification: the request lv_k of the
// due input meets a finished output cycle (event c); rv rises; once ra has
// risen, la_k rises and rv falls; la_k falls after lv_k has fallen and the
// output cycle has ended (ra low); then the next input is due. A 2:1
// multiplexer in front of the data latch selects the due input, so a word
// waiting on the other input cannot disturb the latch.
//
// Realisation (this design's own): t marks event c (set by
// lv_k & ~la & ~rv & ~ra, cleared by la); rv is set by t & ~ra and reset by
// ra & ~t; an internal la is set by t & ra and reset by
// ~lv_k & ~t & ~rv & ~ra, and la_k = la while input k is due. The position
// in the pattern is a master-slave pair of latches on la, and c waits until
// both agree. The latch is transparent while la and rv are low. Gates carry
// a delay GD (ignored by synthesis); the feedback loops are the
// state-holding gates.
// Lint: Verilator reports NOLATCH on the data latch below; synthesis infers a
// transparent latch for it, and simulation holds the word while the enable is
// low, so the warning stands.
module fifo_merge_2x #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned START = 0,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  // left channel 0
  input  logic         lv0,
  output logic         la0,
  input  logic [W-1:0] din0,
  // left channel 1
  input  logic         lv1,
  output logic         la1,
  input  logic [W-1:0] din1,
  // right (output) channel
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  localparam int unsigned PW = 2;

  logic [PW-1:0] s, m;   // position in the pattern: slave, master
  logic          la;
  logic          k;      // due input: 0 or 1
  logic          lvk, t;

  assign k   = (s != '0);
  assign lvk = k ? lv1 : lv0;
  assign la0 = la && !k;
  assign la1 = la &&  k;

  anoc_dlatch #(.W(PW), .INIT(PW'(START)), .GD(GD)) u_m (.rst, .en(la),  .d((s == PW'(2)) ? '0 : s + PW'(1)), .q(m));
  anoc_dlatch #(.W(PW), .INIT(PW'(START)), .GD(GD)) u_s (.rst, .en(!la), .d(m), .q(s));

  anoc_gc #(.GD(GD)) u_t  (.rst, .set(lvk && !la && !rv && !ra && (s == m)), .clr(la), .q(t));
  anoc_gc #(.GD(GD)) u_rv (.rst, .set(t && !ra), .clr(ra && !t),                 .q(rv));
  anoc_gc #(.GD(GD)) u_la (.rst, .set(t && ra),  .clr(!lvk && !t && !rv && !ra), .q(la));

  always_latch begin
    if (!la && !rv) dout = k ? din1 : din0;
  end

endmodule
