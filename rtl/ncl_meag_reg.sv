// ncl_meag_reg: register stage for an N-rail one-hot select MEAG.
//
// Each rail is a resettable TH22 gate with the request ki, exactly like one
// rail of a dual-rail register; since at most one rail is ever high, a single
// acknowledge ko (high when all rails are low) completes the whole group.
// Used to carry the select MEAG down the pipelined ALU alongside the data.
module ncl_meag_reg #(
  parameter int unsigned N = 8
) (
  input  logic         rst,
  input  logic         ki,
  input  logic [N-1:0] m,
  output logic [N-1:0] q,
  output logic         ko
);

  for (genvar k = 0; k < N; k++) begin : g_rail
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_r (
      .rst(rst), .in({ki, m[k]}), .z(q[k])
    );
  end

  assign ko = (q == '0);

endmodule
