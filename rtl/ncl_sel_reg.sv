// ncl_sel_reg: W-bit select register of the pipelined ALU: the register stage
// behind function k, gated by rail k of the pipelined select MEAG.
//
// Each output rail is a resettable TH33 gate over (data rail, MEAG rail m,
// ki). DATA passes only when the function's result, its select rail and the
// request are all present, so the select MEAG (and through it Cin/Bin) is
// consumed here and the result cannot complete before it; the rail falls once
// all three are low. ko is the per-bit acknowledge (high when the bit is
// NULL); its completion is the request of the stage in front.
module ncl_sel_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic         rst,
  input  logic         ki,
  input  logic         m,
  input  dr_t  [W-1:0] d,
  output dr_t  [W-1:0] q,
  output logic [W-1:0] ko
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_r0 (.rst(rst), .in({ki, m, d[i].r0}), .z(q[i].r0));
    ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_r1 (.rst(rst), .in({ki, m, d[i].r1}), .z(q[i].r1));
    assign ko[i] = !(q[i].r0 || q[i].r1);
  end

endmodule
