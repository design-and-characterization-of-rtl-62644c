// ncl_dr_reg: W-bit dual-rail NCL register with request/acknowledge handshake.
//
// Each rail is a resettable TH22 gate whose second input is the request ki
// from the next stage: with ki high ("request for DATA") a DATA wavefront
// passes and is held, with ki low ("request for NULL") a NULL wavefront passes.
// Hysteresis keeps a DATA bit until both the input rail and ki have dropped,
// so successive DATA wavefronts are always separated by NULL.
// ko[i] is the per-bit acknowledge, high when output bit i is NULL; a
// completion component (ncl_comp) merges these into one acknowledge.
// rst forces every output rail low (NULL), as the initial state of an NCL
// system. The TH22-per-rail structure and per-bit ko are the standard NCL
// register; the width is the caller's.
module ncl_dr_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic          rst,
  input  logic          ki,
  input  dr_t  [W-1:0]  d,
  output dr_t  [W-1:0]  q,
  output logic [W-1:0]  ko
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_r0 (
      .rst(rst), .in({ki, d[i].r0}), .z(q[i].r0)
    );
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_r1 (
      .rst(rst), .in({ki, d[i].r1}), .z(q[i].r1)
    );
    assign ko[i] = !(q[i].r0 || q[i].r1);
  end

endmodule
