// fifo_linear: DEPTH linear cells in a chain, the reference self-timed FIFO.
//
// Every word passes through every stage; stage i's right channel is stage
// i+1's left channel. Each cell holds one word, so the FIFO holds DEPTH
// words when its output is stalled. The comparison design is ten stages deep
// and nine bits wide, which are the defaults. The interface is a four-phase
// bundled-data channel on each side (see fifo_linear_cell). The handshake
// wires between the cells form the loops of an asynchronous pipeline.
module fifo_linear #(
  parameter int unsigned W     = anoc_pkg::DATA_W,
  parameter int unsigned DEPTH = 10,
  parameter int unsigned GD    = 1
) (
  input  logic         rst,
  input  logic         lv,
  output logic         la,
  input  logic [W-1:0] din,
  output logic         rv,
  input  logic         ra,
  output logic [W-1:0] dout
);

  logic [DEPTH:0]        v;   // request into stage i
  logic [DEPTH:0]        a;   // acknowledge out of stage i
  logic [DEPTH:0][W-1:0] d;   // data into stage i

  assign v[0] = lv;
  assign la   = a[0];
  assign d[0] = din;
  assign rv   = v[DEPTH];
  assign a[DEPTH] = ra;
  assign dout = d[DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    fifo_linear_cell #(.W(W), .GD(GD)) u_cell (
      .rst (rst),
      .lv  (v[i]),   .la (a[i]),   .din  (d[i]),
      .rv  (v[i+1]), .ra (a[i+1]), .dout (d[i+1])
    );
  end

endmodule
