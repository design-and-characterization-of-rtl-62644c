// ncl_meag_conv: converts the three dual-rail select bits S(2:0) into an
// 8-rail mutually exclusive assertion group (one-hot select MEAG).
//
// Rail k is a TH33 gate over the rails of S2, S1 and S0 that spell k, so
// exactly one rail rises once all three select bits are DATA and it falls
// once they are all NULL. With EMBED=1 the conversion doubles as a register
// (embedded registration): each rail becomes a resettable TH44 gate whose
// fourth input is the request ki, and ko (high when all eight rails are low)
// is the register's acknowledge. With EMBED=0 ki and rst are not used and ko
// simply reports that the MEAG is NULL.
module ncl_meag_conv
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b0
) (
  input  logic           rst,
  input  logic           ki,
  input  dr_t  [2:0]     s,
  output logic [7:0]     sel,
  output logic           ko
);

  for (genvar k = 0; k < 8; k++) begin : g_rail
    logic r2, r1, r0;
    assign r2 = k[2] ? s[2].r1 : s[2].r0;
    assign r1 = k[1] ? s[1].r1 : s[1].r0;
    assign r0 = k[0] ? s[0].r1 : s[0].r0;
    if (EMBED) begin : g_reg
      ncl_th #(.N(4), .M(4), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_th44 (
        .rst(rst), .in({ki, r2, r1, r0}), .z(sel[k])
      );
    end else begin : g_comb
      ncl_th #(.N(3), .M(3)) u_th33 (.rst(1'b0), .in({r2, r1, r0}), .z(sel[k]));
    end
  end

  assign ko = (sel == '0);

endmodule
