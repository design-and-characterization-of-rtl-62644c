// ncl_qr_demux_reg: demultiplexer with embedded registration for the
// pipelined quad-rail ALU.
//
// Every wire of A and B (two quad-rail digits each) goes to all eight
// function sets, and Cin (dual-rail) to sets 4-7, through resettable TH33
// gates whose inputs are the set's request ki[k], the select rail sel[k] and
// the data wire. Only the selected set receives DATA, and it holds that DATA
// until its own request has fallen and the inputs have returned to NULL, so
// the demultiplexer is also the register stage in front of the functions.
// ko_set[k] is set k's completion (ordinary COMP over its four quad-rail
// signals, plus Cin for k >= 4): low when the whole set is DATA, high when
// NULL. The per-set completions are combined by ncl_comp_special.
// Interface: rst, sel[7:0], a, b, cin, ki[7:0] in; fa, fb, fcin per set and
// ko_set out. No clock; the gates' hysteresis is the storage.
// Registering the demultiplexer and passing B to all functions follow the
// design's description of the pipelined ALUs; the gate choice is this
// design's own.
module ncl_qr_demux_reg
  import ncl_pkg::*;
(
  input  logic       rst,
  input  logic [7:0] sel,
  input  qr_t  [1:0] a,
  input  qr_t  [1:0] b,
  input  dr_t        cin,
  input  logic [7:0] ki,
  output qr_t  [1:0] fa     [8],
  output qr_t  [1:0] fb     [8],
  output dr_t        fcin   [8],
  output logic [7:0] ko_set
);

  for (genvar k = 0; k < 8; k++) begin : g_set
    for (genvar d = 0; d < 2; d++) begin : g_digit
      for (genvar r = 0; r < 4; r++) begin : g_rail
        ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_a (
          .rst(rst), .in({ki[k], sel[k], a[d][r]}), .z(fa[k][d][r])
        );
        ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_b (
          .rst(rst), .in({ki[k], sel[k], b[d][r]}), .z(fb[k][d][r])
        );
      end
    end
    if (k >= 4) begin : g_cin
      logic [4:0] sig_ko;
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_c0 (.rst(rst), .in({ki[k], sel[k], cin.r0}), .z(fcin[k].r0));
      ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1)) u_c1 (.rst(rst), .in({ki[k], sel[k], cin.r1}), .z(fcin[k].r1));
      assign sig_ko = {!(fcin[k].r0 || fcin[k].r1), fb[k][1] == '0, fb[k][0] == '0,
                       fa[k][1] == '0, fa[k][0] == '0};
      ncl_comp #(.N(5)) u_cp (.ko_in(sig_ko), .ko(ko_set[k]));
    end else begin : g_no_cin
      logic [3:0] sig_ko;
      assign fcin[k] = DR_NULL;
      assign sig_ko = {fb[k][1] == '0, fb[k][0] == '0, fa[k][1] == '0, fa[k][0] == '0};
      ncl_comp #(.N(4)) u_cp (.ko_in(sig_ko), .ko(ko_set[k]));
    end
  end

endmodule
