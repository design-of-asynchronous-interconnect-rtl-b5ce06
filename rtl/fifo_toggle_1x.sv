// fifo_toggle_1x: a FIFO stage with one input channel and two output
// channels that sends successive words alternately to output 0 and output 1.
// It is the distributing stage of the parallel and tree FIFOs.
//
// Protocol, after the toggle specification: for the selected output k, a
// request lv meets a finished cycle of output k (event c); rv_k rises; once
// ra_k has risen, la rises and rv_k falls; la falls after lv falls; then the
// stage moves to the next output. The stage thus acknowledges a word only
// after the next stage has taken it, and ra_k may still be high when the
// other output is served. The data latch is normally open and closes while
// la or either rv is high, so the word cannot be overwritten while in use.
//
// Realisation (this design's own): t marks event c (set by
// lv & ~la & ~rv_k & ~ra_k, cleared by la); rv_k is set by t & ~ra_k and
// reset by ra_k & ~t; la is set by t & ra_k and reset by ~lv & ~t. The
// position in the pattern is a master-slave pair of latches on la: the
// master takes the next position while la is high, the slave copies it while
// la is low, and c waits until both agree. Gates carry a delay GD (ignored
// by synthesis); the feedback loops are the state-holding gates.
// Lint: Verilator reports NOLATCH on the data latch below; synthesis infers a
// transparent latch for it, and simulation holds the word while the enable is
// low, so the warning stands.
module fifo_toggle_1x #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  // left (input) channel
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  // output channel 0
  output logic         rv0,
  input  logic         ra0,
  // output channel 1
  output logic         rv1,
  input  logic         ra1,
  // data to both outputs
  output logic [W-1:0] dout
);

  localparam int unsigned PW = 1;

  logic [PW-1:0] s, m;   // position in the pattern: slave, master
  logic          k;      // selected output: 0 or 1
  logic          rvk, rak, t;

  assign k   = (s != '0);
  assign rvk = k ? rv1 : rv0;
  assign rak = k ? ra1 : ra0;

  anoc_dlatch #(.W(PW), .INIT(1'b0), .GD(GD)) u_m (.rst, .en(la),  .d(!s), .q(m));
  anoc_dlatch #(.W(PW), .INIT(1'b0), .GD(GD)) u_s (.rst, .en(!la), .d(m), .q(s));

  anoc_gc #(.GD(GD)) u_t   (.rst, .set(lv && !la && !rvk && !rak && (s == m)), .clr(la), .q(t));
  anoc_gc #(.GD(GD)) u_rv0 (.rst, .set(t && !k && !ra0), .clr(ra0 && !t),  .q(rv0));
  anoc_gc #(.GD(GD)) u_rv1 (.rst, .set(t &&  k && !ra1), .clr(ra1 && !t),  .q(rv1));
  anoc_gc #(.GD(GD)) u_la  (.rst, .set(t && rak),        .clr(!lv && !t),  .q(la));

  always_latch begin
    if (!la && !rv0 && !rv1) dout = din;
  end

endmodule
