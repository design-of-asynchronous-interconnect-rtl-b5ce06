// anoc_router: the T-shaped asynchronous router of the binary-tree network.
//
// It has three bidirectional ports, numbered 0, 1, 2 (A, B, C). Each port has
// an input channel feeding a switch and an output channel driven by a join:
// three switches and three joins in all. The router has no buffering of its
// own apart from the one data latch in each join, and it does not packetise:
// every word is routed on its own by its MSB. A word entering port p with
// routing bit 0 leaves by port (p+1) mod 3, with routing bit 1 by port
// (p+2) mod 3; for port A that is B and C, as in the original design, and
// the rotation for B and C is this design's choice. The word leaves rotated
// left by one bit (see anoc_switch).
//
// Join of port p: channel 1 comes from the switch of port (p+2) mod 3 (its
// routing-bit-0 side), channel 2 from the switch of port (p+1) mod 3 (its
// routing-bit-1 side). All channels are four-phase bundled data.
module anoc_router #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic                rst,
  input  logic [2:0]          in_lv,
  output logic [2:0]          in_la,
  input  logic [2:0][W-1:0]   in_data,
  output logic [2:0]          out_rv,
  input  logic [2:0]          out_ra,
  output logic [2:0][W-1:0]   out_data
);

  logic [2:0]        s_rv1, s_ra1, s_rv2, s_ra2;   // switch p, right channels
  logic [2:0][W-1:0] s_d;                          // switch p, data out

  for (genvar p = 0; p < 3; p++) begin : g_port
    localparam int unsigned P1 = (p + 1) % 3;
    localparam int unsigned P2 = (p + 2) % 3;

    anoc_switch #(.W(W), .GD(GD)) u_switch (
      .rst  (rst),
      .lv   (in_lv[p]),  .la (in_la[p]), .din (in_data[p]),
      .rv1  (s_rv1[p]),  .ra1 (s_ra1[p]),
      .rv2  (s_rv2[p]),  .ra2 (s_ra2[p]),
      .dout (s_d[p])
    );

    anoc_join #(.W(W), .GD(GD)) u_join (
      .rst  (rst),
      .mlv1 (s_rv2[P2]), .la1 (s_ra2[P2]), .din1 (s_d[P2]),
      .mlv2 (s_rv1[P1]), .la2 (s_ra1[P1]), .din2 (s_d[P1]),
      .rv   (out_rv[p]), .ra  (out_ra[p]), .dout (out_data[p])
    );
  end

endmodule
