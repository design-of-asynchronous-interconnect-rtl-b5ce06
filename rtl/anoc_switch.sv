// anoc_switch: the switch of the asynchronous router. It steers a four-phase
// request arriving on its left channel to one of its two right channels,
// chosen by the routing bit, the most significant bit of the data word.
//
// The controller is the burst-mode version of the original design:
//   rv1 is set by lv & d and reset by ~lv  (routing bit 1)
//   rv2 is set by lv & ~d and reset by ~lv (routing bit 0)
//   la  is set by ra1 | ra2 and reset by ~ra1 & ~ra2
// so the switch relays the handshake without decoupling: la follows the
// acknowledge of whichever right channel was chosen, and the request on that
// channel falls when lv falls. The switch holds no data: the data word goes
// to both right channels through buffers, with the routing bit rotated from
// the MSB into the LSB so the next switch finds its own routing bit in the
// MSB (the rotation direction is this design's choice). The routing bit must
// be stable from before lv rises until lv falls; if it changes while lv is
// high, both requests could rise, which the assertion below reports.
//
// Gates carry a delay of GD (ignored by synthesis, see fifo_linear_cell);
// the feedback of rv1 and rv2 is their state-holding set/reset function.
module anoc_switch #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  // left (input) channel
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  // right channel 1: routing bit 1
  output logic         rv1,
  input  logic         ra1,
  // right channel 2: routing bit 0
  output logic         rv2,
  input  logic         ra2,
  // data to both right channels, address swizzled
  output logic [W-1:0] dout
);

  assign dout = {din[W-2:0], din[W-1]};

  // din[W-1] is the routing bit d
  anoc_gc #(.GD(GD)) u_rv1 (.rst, .set(lv && din[W-1]),  .clr(!lv),         .q(rv1));
  anoc_gc #(.GD(GD)) u_rv2 (.rst, .set(lv && !din[W-1]), .clr(!lv),         .q(rv2));
  anoc_gc #(.GD(GD)) u_la  (.rst, .set(ra1 || ra2),      .clr(!ra1 && !ra2), .q(la));

  // checked when a request changes, skipping time 0, when the power-up state is random
  always @(rv1 or rv2) begin
    assert ($time == 0 || !(rv1 && rv2)) else $error("switch raised both right requests");
  end

endmodule
