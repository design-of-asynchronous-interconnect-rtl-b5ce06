// anoc_dlatch: a W-bit level-sensitive state latch with a gate delay, used
// for the pattern position of the toggle and merge stages.
//
// While en is high q follows d; while en is low q holds. rst (active high)
// loads INIT. The output changes GD time units after its inputs (transport
// delay, ignored by synthesis). The explicit event list re-evaluates the
// latch on every change of its inputs.
module anoc_dlatch #(
  parameter int unsigned   W    = 1,
  parameter logic [W-1:0]  INIT = '0,
  parameter int unsigned   GD   = 1
) (
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always @(rst or en or d or q)
    q <= #(GD) rst ? INIT : (en ? d : q);

endmodule
