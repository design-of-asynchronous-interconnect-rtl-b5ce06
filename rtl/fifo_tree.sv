// fifo_tree: the tree self-timed FIFO. The words fan out through a binary
// tree of toggle-1x stages (a root and two leaves) into four linear cells
// and are gathered back through a mirror tree of merge-1x stages (two
// leaves and a root) to a single output. Ten stages in all, yet a word in an
// empty FIFO crosses only five: toggle, toggle, linear cell, merge, merge.
//
// Order: the root toggle alternates between the upper and the lower toggle,
// each of which alternates between its two cells, so words 1, 2, 3, 4 land
// in cells 0, 2, 1, 3. The merges undo the same pattern, so words leave in
// the order they came. Both ends are four-phase bundled-data channels.
module fifo_tree #(
  parameter int unsigned W  = anoc_pkg::DATA_W,
  parameter int unsigned GD = 1
) (
  input  logic         rst,
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  // root toggle -> leaf toggles
  logic [1:0]        r_v, r_a;
  logic [W-1:0]      r_d;
  // leaf toggles -> cells (cell 2j+i from leaf j, output i)
  logic [3:0]        c_lv, c_la, c_rv, c_ra;
  logic [1:0][W-1:0] l_d;
  logic [3:0][W-1:0] c_d;
  // leaf merges -> root merge
  logic [1:0]        m_v, m_a;
  logic [1:0][W-1:0] m_d;

  fifo_toggle_1x #(.W(W), .GD(GD)) u_toggle_root (
    .rst (rst), .lv (lv), .la (la), .din (din),
    .rv0 (r_v[0]), .ra0 (r_a[0]), .rv1 (r_v[1]), .ra1 (r_a[1]), .dout (r_d)
  );

  for (genvar j = 0; j < 2; j++) begin : g_half
    fifo_toggle_1x #(.W(W), .GD(GD)) u_toggle (
      .rst (rst), .lv (r_v[j]), .la (r_a[j]), .din (r_d),
      .rv0 (c_lv[2*j]),   .ra0 (c_la[2*j]),
      .rv1 (c_lv[2*j+1]), .ra1 (c_la[2*j+1]), .dout (l_d[j])
    );

    for (genvar i = 0; i < 2; i++) begin : g_cell
      fifo_linear_cell #(.W(W), .GD(GD)) u_cell (
        .rst (rst),
        .lv (c_lv[2*j+i]), .la (c_la[2*j+i]), .din (l_d[j]),
        .rv (c_rv[2*j+i]), .ra (c_ra[2*j+i]), .dout (c_d[2*j+i])
      );
    end

    fifo_merge_1x #(.W(W), .GD(GD)) u_merge (
      .rst (rst),
      .lv0 (c_rv[2*j]),   .la0 (c_ra[2*j]),   .din0 (c_d[2*j]),
      .lv1 (c_rv[2*j+1]), .la1 (c_ra[2*j+1]), .din1 (c_d[2*j+1]),
      .rv (m_v[j]), .ra (m_a[j]), .dout (m_d[j])
    );
  end

  fifo_merge_1x #(.W(W), .GD(GD)) u_merge_root (
    .rst (rst),
    .lv0 (m_v[0]), .la0 (m_a[0]), .din0 (m_d[0]),
    .lv1 (m_v[1]), .la1 (m_a[1]), .din1 (m_d[1]),
    .rv (rv), .ra (ra), .dout (dout)
  );

endmodule
