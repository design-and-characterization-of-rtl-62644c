// ncl_full_adder: dual-rail NCL full adder.
//
// Carry rails are TH23 majority gates over the matching rails of X, Y and Ci.
// Sum rails are TH34w2 gates whose weight-2 input is the opposite carry rail:
//   Co0 = TH23(X0,Y0,Ci0)       Co1 = TH23(X1,Y1,Ci1)
//   S0  = TH34w2(Co1,X0,Y0,Ci0) S1  = TH34w2(Co0,X1,Y1,Ci1)
// The sum needs the carry, and the carry needs two inputs, so all outputs are
// DATA only once all three inputs are: the adder is input-complete.
// Two gate delays to the sum, one to the carry. Level-sensitive, no clock.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.N(3), .M(2)) u_co0 (.rst(1'b0), .in({x.r0, y.r0, ci.r0}), .z(co.r0));
  ncl_th #(.N(3), .M(2)) u_co1 (.rst(1'b0), .in({x.r1, y.r1, ci.r1}), .z(co.r1));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s0 (.rst(1'b0), .in({ci.r0, y.r0, x.r0, co.r1}), .z(s.r0));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s1 (.rst(1'b0), .in({ci.r1, y.r1, x.r1, co.r0}), .z(s.r1));

endmodule
