// ncl_demux_reg: demultiplexer with embedded registration for the pipelined
// dual-rail ALU.
//
// A and B go to all eight functions, Cin/Bin to functions 4-7. Every output
// rail is a resettable TH33 gate over (select rail k, operand rail, ki[k]),
// so the demultiplexer is also the register stage in front of the functions,
// and each function k has its own request ki[k]. Because only the selected
// output set ever carries DATA, completion is done per set: ko_set[k] is a
// C-element over the per-bit acknowledges of set k (high when the set is
// NULL, low when it is all DATA). The special completion (ncl_comp_special)
// combines the eight ko_set lines.
module ncl_demux_reg
  import ncl_pkg::*;
(
  input  logic       rst,
  input  logic [7:0] sel,
  input  dr_t  [3:0] a,
  input  dr_t  [3:0] b,
  input  dr_t        cin,
  input  logic [7:0] ki,
  output dr_t  [3:0] fa     [8],
  output dr_t  [3:0] fb     [8],
  output dr_t        fcin   [8],
  output logic [7:0] ko_set
);

  for (genvar k = 0; k < 8; k++) begin : g_fn
    localparam int unsigned NB = (k >= 4) ? 9 : 8;
    logic [NB-1:0] bit_ko;
    for (genvar i = 0; i < 4; i++) begin : g_bit
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_a0 (.rst(rst), .in({ki[k], sel[k], a[i].r0}), .z(fa[k][i].r0));
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_a1 (.rst(rst), .in({ki[k], sel[k], a[i].r1}), .z(fa[k][i].r1));
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_b0 (.rst(rst), .in({ki[k], sel[k], b[i].r0}), .z(fb[k][i].r0));
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_b1 (.rst(rst), .in({ki[k], sel[k], b[i].r1}), .z(fb[k][i].r1));
      assign bit_ko[i]     = !(fa[k][i].r0 || fa[k][i].r1);
      assign bit_ko[4 + i] = !(fb[k][i].r0 || fb[k][i].r1);
    end
    if (k >= 4) begin : g_cin
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_c0 (.rst(rst), .in({ki[k], sel[k], cin.r0}), .z(fcin[k].r0));
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_c1 (.rst(rst), .in({ki[k], sel[k], cin.r1}), .z(fcin[k].r1));
      assign bit_ko[8] = !(fcin[k].r0 || fcin[k].r1);
    end else begin : g_nocin
      assign fcin[k] = '0;
    end
    ncl_comp #(.N(NB)) u_cp (.ko_in(bit_ko), .ko(ko_set[k]));
  end

endmodule
