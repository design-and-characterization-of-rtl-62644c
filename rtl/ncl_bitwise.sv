// ncl_bitwise: 4-bit input-complete dual-rail OR, AND or XOR (chosen by OP).
//
// Each result bit is two gates, one per rail, both in a single gate level.
// Each gate only asserts once both operand bits are DATA, and (hysteresis)
// only clears once both are NULL, so the function is input-complete in A and
// B even where the Boolean result would not need both:
//   OR : F0 = TH22(A0,B0)                    F1 = A1(B0+B1) + A0B1
//   AND: F1 = TH22(A1,B1)                    F0 = A0(B0+B1) + A1B0
//   XOR: F0 = A0B0 + A1B1                    F1 = A0B1 + A1B0
// (A0/A1 are the DATA0/DATA1 rails.) Level-sensitive, no clock.
module ncl_bitwise
  import ncl_pkg::*;
#(
  parameter alu_op_e OP = OP_OR
) (
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  output dr_t [3:0] f
);

  for (genvar i = 0; i < 4; i++) begin : g_bit
    logic a0, a1, b0, b1;
    logic set0, set1;
    assign {a1, a0} = {a[i].r1, a[i].r0};
    assign {b1, b0} = {b[i].r1, b[i].r0};

    always_comb begin
      unique case (OP)
        OP_OR: begin
          set0 = a0 && b0;
          set1 = (a1 && (b0 || b1)) || (a0 && b1);
        end
        OP_AND: begin
          set0 = (a0 && (b0 || b1)) || (a1 && b0);
          set1 = a1 && b1;
        end
        default: begin  // OP_XOR
          set0 = (a0 && b0) || (a1 && b1);
          set1 = (a0 && b1) || (a1 && b0);
        end
      endcase
    end

    ncl_gate #(.N(4)) u_f0 (.rst(1'b0), .in({a1, a0, b1, b0}), .set(set0), .z(f[i].r0));
    ncl_gate #(.N(4)) u_f1 (.rst(1'b0), .in({a1, a0, b1, b0}), .set(set1), .z(f[i].r1));
  end

  initial assert (OP == OP_OR || OP == OP_AND || OP == OP_XOR)
    else $error("ncl_bitwise: OP must be OR, AND or XOR");

endmodule
