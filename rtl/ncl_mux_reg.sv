// ncl_mux_reg: output multiplexer with embedded registration of the
// pipelined ALU.
//
// F is the OR of each rail over the eight select-register outputs (two TH14
// and a final gate with ki per rail, as ncl_mux with EMBED=1). Functions 0-3
// have no carry output, so their carry-out of 0 is made from their F0 bit:
// a TH12 over the two F0 rails of select register k (k < 4) gives a DATA0
// carry candidate once F0 is DATA; these four candidates and the carry
// outputs of functions 4-7 are merged the same way into Cout. ko is the
// per-bit acknowledge of the five outputs (F3..F0, Cout in bit 4).
module ncl_mux_reg
  import ncl_pkg::*;
(
  input  logic       rst,
  input  logic       ki,
  input  dr_t  [3:0] fk [8],
  input  dr_t        ck [4],
  output dr_t  [3:0] f,
  output dr_t        cout,
  output logic [4:0] ko
);

  dr_t [0:0] csrc [8];
  dr_t [0:0] cq;

  for (genvar k = 0; k < 4; k++) begin : g_c_low
    logic f0_valid;
    ncl_th #(.N(2), .M(1)) u_f0v (.rst(1'b0), .in({fk[k][0].r1, fk[k][0].r0}), .z(f0_valid));
    assign csrc[k] = dr_t'{r1: 1'b0, r0: f0_valid};
    assign csrc[k+4] = ck[k];
  end

  ncl_mux #(.N(8), .W(4), .EMBED(1'b1)) u_fmux (
    .rst(rst), .ki(ki), .src(fk), .f(f), .ko(ko[3:0])
  );
  ncl_mux #(.N(8), .W(1), .EMBED(1'b1)) u_cmux (
    .rst(rst), .ki(ki), .src(csrc), .f(cq), .ko(ko[4:4])
  );
  assign cout = cq[0];

endmodule
