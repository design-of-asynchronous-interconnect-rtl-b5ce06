// anoc_gc: a generalised C-element, the state-holding gate every
// asynchronous controller in this design is built from.
//
// q rises when set is high, falls when clr is high, and otherwise keeps its
// value: q = set | (q & ~clr). The controllers only ever raise one of set and
// clr at a time. rst (active high) forces q low. The output follows its
// inputs after GD time units, with transport delay; synthesis ignores the
// delay and sees a gate with feedback from its own output, which is how the
// state is held. The explicit event list re-evaluates the gate on every
// change of its inputs.
module anoc_gc #(
  parameter int unsigned GD = 1
) (
  input  logic rst,
  input  logic set,
  input  logic clr,
  output logic q
);

  always @(rst or set or clr or q)
    q <= #(GD) !rst && (set || (q && !clr));

endmodule
