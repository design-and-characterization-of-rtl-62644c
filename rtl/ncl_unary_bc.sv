// ncl_unary_bc: NOT A, shift right and shift left for the pipelined and
// quad-rail style ALUs, where B reaches these functions and completeness in B
// must be ensured inside them.
//
// Every result rail is a TH23 gate over the source rail and both rails of one
// B bit, so it rises only once that B bit is DATA and falls only once it is
// NULL (two of the three inputs can only be high together when the source
// rail and one B rail are). Each B bit guards one result bit:
//   NOT: F(i) = ~A(i) guarded by B(i)
//   SHR: F3 = Cin (B3), F2..F0 = A3..A1 (B2..B0), Cout = A0
//   SHL: F0 = Cin (B0), F3..F1 = A2..A0 (B3..B1), Cout = A3
// For NOT, cin is not used and cout stays NULL. One gate delay.
module ncl_unary_bc
  import ncl_pkg::*;
#(
  parameter alu_op_e OP = OP_NOT
) (
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  input  dr_t       cin,
  output dr_t [3:0] f,
  output dr_t       cout
);

  dr_t [3:0] src;

  always_comb begin
    unique case (OP)
      OP_SHR: src = {cin, a[3:1]};
      OP_SHL: src = {a[2:0], cin};
      default: for (int i = 0; i < 4; i++) src[i] = dr_t'{r1: a[i].r0, r0: a[i].r1};
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_bit
    ncl_th #(.N(3), .M(2)) u_f0 (.rst(1'b0), .in({b[i].r1, b[i].r0, src[i].r0}), .z(f[i].r0));
    ncl_th #(.N(3), .M(2)) u_f1 (.rst(1'b0), .in({b[i].r1, b[i].r0, src[i].r1}), .z(f[i].r1));
  end

  if (OP == OP_SHR) begin : g_shr
    assign cout = a[0];
  end else if (OP == OP_SHL) begin : g_shl
    assign cout = a[3];
  end else begin : g_not
    logic unused_cin;
    assign unused_cin = ^cin;
    assign cout = '0;
  end

  initial assert (OP == OP_NOT || OP == OP_SHR || OP == OP_SHL)
    else $error("ncl_unary_bc: OP must be NOT, SHR or SHL");

endmodule
