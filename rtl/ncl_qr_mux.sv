// ncl_qr_mux: N-to-1 multiplexer for two-digit quad-rail words.
//
// Only the selected function's result is DATA (the demultiplexer sends NULL to
// all others), so each output wire is the OR of the same wire of all N
// sources: a tree of TH1n gates of at most four inputs (groups of four, then
// one gate over the groups). With hysteresis each gate holds DATA until all
// its inputs are NULL.
// With EMBED=1 (embedded registration) the final gate of every wire also
// needs the request ki to set and is reset to NULL, so the multiplexer serves
// as the output register for F; ko[d] is then the acknowledge of digit d (high
// when the digit is NULL).
// Interface: rst, ki (used with EMBED=1), src[N] (two quad-rail digits each)
// in; f, ko out. Two gate delays for N = 8. N must be 4, 8, 12 or 16.
module ncl_qr_mux
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter bit          EMBED = 1'b0
) (
  input  logic       rst,
  input  logic       ki,
  input  qr_t  [1:0] src [N],
  output qr_t  [1:0] f,
  output logic [1:0] ko
);

  localparam int unsigned G = N / 4;

  initial assert (N % 4 == 0 && N >= 4 && N <= 16) else $error("ncl_qr_mux: N must be 4, 8, 12 or 16");

  for (genvar w = 0; w < 8; w++) begin : g_wire
    logic [G-1:0] grp;
    for (genvar g = 0; g < G; g++) begin : g_grp
      ncl_th #(.N(4), .M(1)) u_grp (
        .rst(1'b0),
        .in({src[4*g+3][w/4][w%4], src[4*g+2][w/4][w%4], src[4*g+1][w/4][w%4], src[4*g][w/4][w%4]}),
        .z(grp[g])
      );
    end
    if (EMBED) begin : g_reg
      ncl_gate #(.N(G + 1), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_final (
        .rst(rst), .in({ki, grp}), .set(ki && (|grp)), .z(f[w/4][w%4])
      );
    end else if (G == 1) begin : g_one
      assign f[w/4][w%4] = grp[0];
    end else begin : g_final
      ncl_th #(.N(G), .M(1)) u_final (.rst(1'b0), .in(grp), .z(f[w/4][w%4]));
    end
  end

  assign ko[0] = (f[0] == '0);
  assign ko[1] = (f[1] == '0);

endmodule
