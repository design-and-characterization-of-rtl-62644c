// ncl_comp: completion component, an N-input C-element built from gates of at
// most four inputs.
//
// The output rises when all N acknowledge inputs are high and falls when all
// are low; in between it holds. It merges the per-bit acknowledges of one or
// more registers into a single request for the previous stage. The inputs
// are split into groups of four (the last group takes the remainder), each
// merged by a THnn gate, and the group outputs are merged by one more THnn
// gate, so N may be at most 16. Level-sensitive, no clock.
module ncl_comp #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] ko_in,
  output logic         ko
);

  localparam int unsigned G = (N + 3) / 4;

  logic [G-1:0] grp;

  for (genvar g = 0; g < G; g++) begin : g_grp
    localparam int unsigned GW = ((N - 4 * g) >= 4) ? 4 : (N - 4 * g);
    ncl_th #(.N(GW), .M(GW)) u_th (.rst(1'b0), .in(ko_in[4*g +: GW]), .z(grp[g]));
  end

  if (G == 1) begin : g_one
    assign ko = grp[0];
  end else begin : g_two
    ncl_th #(.N(G), .M(G)) u_th (.rst(1'b0), .in(grp), .z(ko));
  end

  initial assert (N >= 1 && N <= 16) else $error("ncl_comp: N must be 1..16");

endmodule
