// ncl_qr_meag_conv: select conversion of the quad-rail ALU.
//
// The quad-rail ALU takes its select as one dual-rail signal S2 and one
// quad-rail signal S(1:0). Operation k (0-7) is selected when rail k[2] of S2
// and rail k[1:0] of S(1:0) are both high, so each of the eight one-hot
// select rails (MEAG) is a TH22 gate of one S2 rail and one S(1:0) rail.
// A rail rises only once both select signals are DATA and falls only once
// both are NULL, so the conversion is input-complete.
// With EMBED=1 (embedded registration) the request ki is a third input of
// every gate (TH33, reset to NULL), so the conversion also serves as the
// select input register; ko is then its acknowledge (high when all rails are
// low).
// Interface: rst, ki (used with EMBED=1), s2 (dual-rail), s10 (quad-rail) in;
// sel[7:0], ko out. One gate delay; its only storage is gate hysteresis. The
// split of S into S2 and S(1:0) follows the design's quad-rail interface; the
// gate choice is this design's own.
module ncl_qr_meag_conv
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b0
) (
  input  logic       rst,
  input  logic       ki,
  input  dr_t        s2,
  input  qr_t        s10,
  output logic [7:0] sel,
  output logic       ko
);

  for (genvar k = 0; k < 8; k++) begin : g_rail
    logic s2_rail;
    assign s2_rail = (k >= 4) ? s2.r1 : s2.r0;
    if (EMBED) begin : g_reg
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_sel (
        .rst(rst), .in({ki, s2_rail, s10[k % 4]}), .z(sel[k])
      );
    end else begin : g_plain
      ncl_th #(.N(2), .M(2)) u_sel (.rst(1'b0), .in({s2_rail, s10[k % 4]}), .z(sel[k]));
    end
  end
  assign ko = (sel == '0);

endmodule
