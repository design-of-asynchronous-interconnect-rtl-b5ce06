// anoc_top: one router of the asynchronous interconnect with FIFO buffers on
// its ports, the one-router system the network is validated on.
//
// Function: three bidirectional 9-bit ports (0, 1, 2). A word written into
// the input channel of port p is buffered, routed by its MSB to port
// (p+1) mod 3 (MSB 0) or (p+2) mod 3 (MSB 1), rotated left by one bit,
// buffered again and offered on the output channel of that port.
//
// Structure: each input channel passes through one of the three FIFO
// styles the document compares before the router, so that all of them carry
// real traffic: port 0 a linear FIFO, port 1 a parallel FIFO, port 2 a
// square FIFO. Each router output is buffered by a tree FIFO. The choice of
// which FIFO sits where is this design's; the document puts FIFO buffers
// between the processing elements and the network but does not fix a style
// per port.
//
// Interface: per port a four-phase bundled-data input channel
// (in_lv request, in_la acknowledge, in_data) and output channel (out_rv
// request, out_ra acknowledge, out_data). rst is active high and must be
// pulsed (low, high, low) after power-up; it clears every controller and
// latch to the empty state.
//
// Timing: there is no clock. Data must be stable on in_data before in_lv
// rises and held until in_la rises (bundled-data constraint); out_data is
// stable while out_rv is high. Each gate is modelled with the delay GD
// (simulation only).
module anoc_top #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic              rst,
  input  logic [2:0]        in_lv,
  output logic [2:0]        in_la,
  input  logic [2:0][W-1:0] in_data,
  output logic [2:0]        out_rv,
  input  logic [2:0]        out_ra,
  output logic [2:0][W-1:0] out_data
);

  logic [2:0]        r_lv, r_la, r_rv, r_ra;   // router-side channels
  logic [2:0][W-1:0] r_din, r_dout;

  fifo_linear #(.W(W), .GD(GD)) u_in0 (
    .rst (rst),
    .lv  (in_lv[0]), .la (in_la[0]), .din  (in_data[0]),
    .rv  (r_lv[0]),  .ra (r_la[0]),  .dout (r_din[0])
  );

  fifo_parallel #(.W(W), .GD(GD)) u_in1 (
    .rst (rst),
    .lv  (in_lv[1]), .la (in_la[1]), .din  (in_data[1]),
    .rv  (r_lv[1]),  .ra (r_la[1]),  .dout (r_din[1])
  );

  fifo_square #(.W(W), .GD(GD)) u_in2 (
    .rst (rst),
    .lv  (in_lv[2]), .la (in_la[2]), .din  (in_data[2]),
    .rv  (r_lv[2]),  .ra (r_la[2]),  .dout (r_din[2])
  );

  anoc_router #(.W(W), .GD(GD)) u_router (
    .rst      (rst),
    .in_lv    (r_lv), .in_la  (r_la), .in_data  (r_din),
    .out_rv   (r_rv), .out_ra (r_ra), .out_data (r_dout)
  );

  for (genvar p = 0; p < 3; p++) begin : g_out
    fifo_tree #(.W(W), .GD(GD)) u_out (
      .rst (rst),
      .lv  (r_rv[p]),   .la (r_ra[p]),   .din  (r_dout[p]),
      .rv  (out_rv[p]), .ra (out_ra[p]), .dout (out_data[p])
    );
  end

endmodule
