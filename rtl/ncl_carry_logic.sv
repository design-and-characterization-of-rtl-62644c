// ncl_carry_logic: final carry/borrow output of the dual-rail ALU.
//
// Ci is the multiplexed carry from the shift, subtract and add functions; it
// is NULL for operations 0-3, which produce no carry. For those operations
// the carry output must be DATA0, and the ALU must still wait for Cin/Bin,
// which no function consumed. So:
//   Co1 = Ci1 (a wire)
//   Co0 = a threshold-3 gate that asserts when Ci0 is asserted, or when S2 is
//         DATA0 (operations 0-3) and Cin/Bin is DATA on either rail; it clears
//         once all its inputs are low.
// In gate terms Co0 is a weighted threshold-3 gate over Ci0 (weight 3), S2^0
// (weight 2), Cin^0 and Cin^1.
// With EMBED=1 both rails also take the request ki and a reset, making the
// carry logic an embedded register stage; ko is then its acknowledge.
module ncl_carry_logic
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b0
) (
  input  logic rst,
  input  logic ki,
  input  dr_t  ci,
  input  dr_t  cin,
  input  logic s2_0,
  output dr_t  co,
  output logic ko
);

  if (EMBED) begin : g_reg
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_co1 (
      .rst(rst), .in({ki, ci.r1}), .z(co.r1)
    );
    // Weights: Ci0 3, S2^0 2, Cin rails 1, ki 3; threshold 6.
    ncl_gate #(.N(5), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_co0 (
      .rst(rst), .in({ki, cin.r1, cin.r0, s2_0, ci.r0}),
      .set(ki && (ci.r0 || (s2_0 && (cin.r0 || cin.r1)))), .z(co.r0)
    );
  end else begin : g_comb
    assign co.r1 = ci.r1;
    ncl_th #(.N(4), .M(3), .W0(3), .W1(2)) u_co0 (
      .rst(1'b0), .in({cin.r1, cin.r0, s2_0, ci.r0}), .z(co.r0)
    );
  end

  assign ko = !(co.r0 || co.r1);

endmodule
