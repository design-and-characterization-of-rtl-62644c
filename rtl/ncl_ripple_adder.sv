// ncl_ripple_adder: W-bit dual-rail ripple-carry adder or subtractor.
//
// A chain of W NCL full adders. With SUB=0 it computes A + B + Cin and cout is
// the carry out. With SUB=1 it computes A - B - 1 + Bin as A + ~B + Bin: the
// inversion of B is free in dual-rail logic (the two rails of each B bit are
// swapped), and cout is then the borrow output Bout of the function table
// (Bout = 1 when A - B - 1 + Bin does not go below zero).
// Level-sensitive; worst case 2*W gate delays.
module ncl_ripple_adder
  import ncl_pkg::*;
#(
  parameter int unsigned W   = 4,
  parameter bit          SUB = 1'b0
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  dr_t         cin,
  output dr_t [W-1:0] f,
  output dr_t         cout
);

  dr_t [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    dr_t bi;
    assign bi = SUB ? dr_t'{r1: b[i].r0, r0: b[i].r1} : b[i];
    ncl_full_adder u_fa (.x(a[i]), .y(bi), .ci(c[i]), .s(f[i]), .co(c[i+1]));
  end

  assign cout = c[W];

endmodule
