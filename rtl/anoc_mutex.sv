// anoc_mutex: two-way mutual-exclusion element (ME) of the join.
//
// A grant stays with its channel while that channel's request is high;
// when no grant is held the first request to arrive is granted, and on a
// tie channel 1 wins. Both grants come from one gate, so they can never be
// high together. A real ME settles a tie through a metastable state for an
// unbounded time; a two-state simulation cannot show that, and the fixed
// tie rule stands in for it. Grants change GD time units after the requests
// (transport delay, ignored by synthesis); rst (active high) drops both.
module anoc_mutex #(
  parameter int unsigned GD = 1
) (
  input  logic       rst,
  input  logic [1:0] req,     // bit 0: channel 1, bit 1: channel 2
  output logic [1:0] grant
);

  function automatic logic [1:0] arbitrate(input logic [1:0] r, input logic [1:0] g);
    if (g[0] && r[0]) return 2'b01;
    if (g[1] && r[1]) return 2'b10;
    if (r[0])         return 2'b01;
    if (r[1])         return 2'b10;
    return 2'b00;
  endfunction

  always @(rst or req or grant)
    grant <= #(GD) rst ? 2'b00 : arbitrate(req, grant);

  // checked when a grant changes, skipping time 0, when the power-up state is random
  always @(grant) begin
    assert ($time == 0 || !(grant[0] && grant[1])) else $error("mutex granted both channels");
  end

endmodule
