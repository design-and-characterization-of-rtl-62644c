// ncl_demux: steers the dual-rail operands A, B and Cin/Bin to the one
// function picked by the 8-rail select MEAG.
//
// Every output rail is a threshold gate with the select rail as one input, so
// only the selected function sees DATA; the others stay NULL.
//   - ops 0,1,2,6,7 (OR, AND, XOR, SUB, ADD): A and B pass through TH22 gates.
//   - ops 3,4,5 (NOT, SHR, SHL) do not use B. With PASS_B_ALL=0 bit i of A
//     passes through a TH34 gate whose inputs are the select rail, the A rail
//     and both rails of B(i), so A only arrives once B is DATA and only clears
//     once B is NULL: this keeps the ALU input-complete in B. No B is passed.
//   - With PASS_B_ALL=1 B is passed to every function through TH22 gates and
//     A passes through TH22 gates too; completeness in B is then left to the
//     functions (this is how the quad-rail and pipelined ALUs are organised).
//   - ops 4..7 (SHR, SHL, SUB, ADD) receive Cin/Bin through TH22 gates.
// Outputs that a function does not receive are held NULL.
module ncl_demux
  import ncl_pkg::*;
#(
  parameter bit PASS_B_ALL = 1'b0
) (
  input  logic [7:0]    sel,
  input  dr_t  [3:0]    a,
  input  dr_t  [3:0]    b,
  input  dr_t           cin,
  output dr_t  [3:0]    fa   [8],
  output dr_t  [3:0]    fb   [8],
  output dr_t           fcin [8]
);

  for (genvar k = 0; k < 8; k++) begin : g_fn
    localparam bit USES_B = !(k == 3 || k == 4 || k == 5);
    for (genvar i = 0; i < 4; i++) begin : g_bit
      if (USES_B || PASS_B_ALL) begin : g_ab
        ncl_th #(.N(2), .M(2)) u_a0 (.rst(1'b0), .in({sel[k], a[i].r0}), .z(fa[k][i].r0));
        ncl_th #(.N(2), .M(2)) u_a1 (.rst(1'b0), .in({sel[k], a[i].r1}), .z(fa[k][i].r1));
        ncl_th #(.N(2), .M(2)) u_b0 (.rst(1'b0), .in({sel[k], b[i].r0}), .z(fb[k][i].r0));
        ncl_th #(.N(2), .M(2)) u_b1 (.rst(1'b0), .in({sel[k], b[i].r1}), .z(fb[k][i].r1));
      end else begin : g_a_bcomplete
        ncl_th #(.N(4), .M(3)) u_a0 (
          .rst(1'b0), .in({sel[k], a[i].r0, b[i].r0, b[i].r1}), .z(fa[k][i].r0)
        );
        ncl_th #(.N(4), .M(3)) u_a1 (
          .rst(1'b0), .in({sel[k], a[i].r1, b[i].r0, b[i].r1}), .z(fa[k][i].r1)
        );
        assign fb[k][i] = '0;
      end
    end
    if (k >= 4) begin : g_cin
      ncl_th #(.N(2), .M(2)) u_c0 (.rst(1'b0), .in({sel[k], cin.r0}), .z(fcin[k].r0));
      ncl_th #(.N(2), .M(2)) u_c1 (.rst(1'b0), .in({sel[k], cin.r1}), .z(fcin[k].r1));
    end else begin : g_nocin
      assign fcin[k] = '0;
    end
  end

endmodule
