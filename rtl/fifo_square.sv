// fifo_square: the square self-timed FIFO, a tree FIFO folded into a grid
// so that it packs into a rectangle. A top row of three stages deals the
// words into three vertical column FIFOs and a bottom row of three stages
// collects them:
//
//   top row:     toggle-2x (col 1) -> toggle-1x (col 2) -> linear cell (col 3)
//                    |                    |                    |
//   columns:     V1_DEPTH cells       V2_DEPTH cells       V3_DEPTH cells
//                    |                    |                    |
//   bottom row:  linear cell (col 1) -> merge-1x (col 2) -> merge-2x (col 3) -> out
//
// The first word runs along the whole top row and drops into column 3, the
// second drops into column 2, the third into column 1, and the pattern
// repeats (the toggle-2x starts at position 1 of its pattern for this). The
// bottom row collects in the same order: the merge-2x takes one word from
// column 3, then two from its left, and the merge-1x alternates between
// column 2 and column 1. The defaults (1, 2, 1 column cells) make ten stages
// in all, the size of the comparison design; how the four column cells are
// spread over the columns is this design's choice. Both ends are four-phase
// bundled-data channels.
module fifo_square #(
  parameter int unsigned W        = anoc_pkg::DATA_W,
  parameter int unsigned V1_DEPTH = 1,
  parameter int unsigned V2_DEPTH = 2,
  parameter int unsigned V3_DEPTH = 1,
  parameter int unsigned GD       = 1
) (
  input  logic         rst,
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  // top row
  logic         t12_v, t12_a, t23_v, t23_a;       // col1 -> col2 -> col3
  logic [W-1:0] t1_d, t2_d;
  // column inputs and outputs (index 0..2 = column 1..3)
  logic [2:0]        ci_v, ci_a, co_v, co_a;
  logic [2:0][W-1:0] ci_d, co_d;
  // bottom row
  logic         b12_v, b12_a, b23_v, b23_a;
  logic [W-1:0] b12_d, b23_d;

  fifo_toggle_2x #(.W(W), .START(1), .GD(GD)) u_top1 (
    .rst (rst), .lv (lv), .la (la), .din (din),
    .rv0 (ci_v[0]), .ra0 (ci_a[0]), .rv1 (t12_v), .ra1 (t12_a), .dout (t1_d)
  );
  assign ci_d[0] = t1_d;

  fifo_toggle_1x #(.W(W), .GD(GD)) u_top2 (
    .rst (rst), .lv (t12_v), .la (t12_a), .din (t1_d),
    .rv0 (t23_v), .ra0 (t23_a), .rv1 (ci_v[1]), .ra1 (ci_a[1]), .dout (t2_d)
  );
  assign ci_d[1] = t2_d;

  fifo_linear_cell #(.W(W), .GD(GD)) u_top3 (
    .rst (rst), .lv (t23_v), .la (t23_a), .din (t2_d),
    .rv (ci_v[2]), .ra (ci_a[2]), .dout (ci_d[2])
  );

  fifo_linear #(.W(W), .DEPTH(V1_DEPTH), .GD(GD)) u_col1 (
    .rst (rst), .lv (ci_v[0]), .la (ci_a[0]), .din (ci_d[0]),
    .rv (co_v[0]), .ra (co_a[0]), .dout (co_d[0])
  );
  fifo_linear #(.W(W), .DEPTH(V2_DEPTH), .GD(GD)) u_col2 (
    .rst (rst), .lv (ci_v[1]), .la (ci_a[1]), .din (ci_d[1]),
    .rv (co_v[1]), .ra (co_a[1]), .dout (co_d[1])
  );
  fifo_linear #(.W(W), .DEPTH(V3_DEPTH), .GD(GD)) u_col3 (
    .rst (rst), .lv (ci_v[2]), .la (ci_a[2]), .din (ci_d[2]),
    .rv (co_v[2]), .ra (co_a[2]), .dout (co_d[2])
  );

  fifo_linear_cell #(.W(W), .GD(GD)) u_bot1 (
    .rst (rst), .lv (co_v[0]), .la (co_a[0]), .din (co_d[0]),
    .rv (b12_v), .ra (b12_a), .dout (b12_d)
  );

  fifo_merge_1x #(.W(W), .GD(GD)) u_bot2 (
    .rst (rst),
    .lv0 (co_v[1]), .la0 (co_a[1]), .din0 (co_d[1]),
    .lv1 (b12_v),   .la1 (b12_a),   .din1 (b12_d),
    .rv (b23_v), .ra (b23_a), .dout (b23_d)
  );

  fifo_merge_2x #(.W(W), .START(0), .GD(GD)) u_bot3 (
    .rst (rst),
    .lv0 (co_v[2]), .la0 (co_a[2]), .din0 (co_d[2]),
    .lv1 (b23_v),   .la1 (b23_a),   .din1 (b23_d),
    .rv (rv), .ra (ra), .dout (dout)
  );

endmodule
