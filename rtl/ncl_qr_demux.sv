// ncl_qr_demux: operand demultiplexer of the quad-rail ALU.
//
// A and B (two quad-rail digits each) are passed to the function selected by
// the one-hot select sel; the other seven functions see NULL. Each rail of
// each destination is a TH22 gate of the select rail and the source rail.
// Cin/Bin goes only to functions 4-7 (shifts, subtract, add), which use it.
// B goes to every function, including NOT and the shifts that do not use its
// value: those functions wait for B themselves (see ncl_qr_func), because
// doing so here would need gates with more than four inputs.
// Interface: sel[7:0], a, b (2 quad-rail digits), cin in; fa, fb, fcin per
// function out. One gate delay; combinational NCL. Passing B to all
// functions follows the design's description; the gates are this design's
// choice.
module ncl_qr_demux
  import ncl_pkg::*;
(
  input  logic [7:0] sel,
  input  qr_t  [1:0] a,
  input  qr_t  [1:0] b,
  input  dr_t        cin,
  output qr_t  [1:0] fa   [8],
  output qr_t  [1:0] fb   [8],
  output dr_t        fcin [8]
);

  for (genvar k = 0; k < 8; k++) begin : g_fn
    for (genvar d = 0; d < 2; d++) begin : g_digit
      for (genvar r = 0; r < 4; r++) begin : g_rail
        ncl_th #(.N(2), .M(2)) u_a (.rst(1'b0), .in({sel[k], a[d][r]}), .z(fa[k][d][r]));
        ncl_th #(.N(2), .M(2)) u_b (.rst(1'b0), .in({sel[k], b[d][r]}), .z(fb[k][d][r]));
      end
    end
    if (k >= 4) begin : g_cin
      ncl_th #(.N(2), .M(2)) u_c0 (.rst(1'b0), .in({sel[k], cin.r0}), .z(fcin[k].r0));
      ncl_th #(.N(2), .M(2)) u_c1 (.rst(1'b0), .in({sel[k], cin.r1}), .z(fcin[k].r1));
    end else begin : g_no_cin
      assign fcin[k] = DR_NULL;
    end
  end

endmodule
