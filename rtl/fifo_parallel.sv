// fifo_parallel: the parallel self-timed FIFO. A toggle-1x deals the words
// alternately into two linear FIFOs of BRANCH_DEPTH cells and a merge-1x
// collects them in the same alternating order, so the whole behaves as one
// FIFO while a word crosses only BRANCH_DEPTH + 2 stages instead of all of
// them. The defaults give the ten-cell comparison design: one toggle, two
// branches of four linear cells, one merge. Both ends are four-phase
// bundled-data channels.
module fifo_parallel #(
  parameter int unsigned W            = anoc_pkg::DATA_W,
  parameter int unsigned BRANCH_DEPTH = 4,
  parameter int unsigned GD           = 1
) (
  input  logic         rst,
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  logic [1:0]        b_lv, b_la, b_rv, b_ra;
  logic [W-1:0]      t_d;
  logic [1:0][W-1:0] b_d;

  fifo_toggle_1x #(.W(W), .GD(GD)) u_toggle (
    .rst (rst), .lv (lv), .la (la), .din (din),
    .rv0 (b_lv[0]), .ra0 (b_la[0]), .rv1 (b_lv[1]), .ra1 (b_la[1]), .dout (t_d)
  );

  for (genvar b = 0; b < 2; b++) begin : g_branch
    fifo_linear #(.W(W), .DEPTH(BRANCH_DEPTH), .GD(GD)) u_branch (
      .rst (rst), .lv (b_lv[b]), .la (b_la[b]), .din (t_d),
      .rv (b_rv[b]), .ra (b_ra[b]), .dout (b_d[b])
    );
  end

  fifo_merge_1x #(.W(W), .GD(GD)) u_merge (
    .rst (rst),
    .lv0 (b_rv[0]), .la0 (b_ra[0]), .din0 (b_d[0]),
    .lv1 (b_rv[1]), .la1 (b_ra[1]), .din1 (b_d[1]),
    .rv (rv), .ra (ra), .dout (dout)
  );

endmodule
