// ncl_wire_sel_reg: select register of the pipelined quad-rail ALU.
//
// W data wires (any mix of quad-rail and dual-rail signals) are registered
// by one resettable TH33 gate each, whose other inputs are the request ki
// and the function's MEAG rail m: a function's result enters only when the
// select wavefront of that function has reached this stage, which keeps
// results in order, and is held until ki and m have fallen and the data
// has returned to NULL. Completion is left to the caller, which knows how the
// wires group into signals.
// Interface: rst, ki, m, d[W] in; q[W] out. No clock; storage is gate
// hysteresis. The gate choice is this design's own.
module ncl_wire_sel_reg #(
  parameter int unsigned W = 8
) (
  input  logic         rst,
  input  logic         ki,
  input  logic         m,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  for (genvar i = 0; i < W; i++) begin : g_wire
    ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_r (.rst(rst), .in({ki, m, d[i]}), .z(q[i]));
  end

endmodule
