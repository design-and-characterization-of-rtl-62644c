// ncl_qr_pipe_adder: pipelined 4-bit quad-rail adder (SUB=1: subtractor) for
// the pipelined quad-rail ALU.
//
// Two quad-rail digit adders (ncl_qr_adder_digit) with one register stage
// between them: the first digit adder's sum and carry, together with the
// A and B digits still to be added, are held in a register (one TH22 with
// request per wire), whose completion is ko; the second digit adder works
// from that register, so a new operand can enter while the previous one
// finishes. SUB=1 adds the complement of B (each B digit's rails reversed)
// and Bin, i.e. A - B - 1 + Bin.
// Interface: rst, a, b (two quad-rail digits), cin (dual-rail), ki (request
// for the internal register, from the next stage) in; f, cout, ko out.
// Latency: one digit adder, the register, one digit adder. No clock;
// latches and loops are NCL hysteresis and the handshake.
// Pipelining the adders follows the design's description of the pipelined
// ALUs; placing one register between the two digit adders is this design's
// own choice.
module ncl_qr_pipe_adder
  import ncl_pkg::*;
#(
  parameter bit SUB = 1'b0
) (
  input  logic       rst,
  input  qr_t  [1:0] a,
  input  qr_t  [1:0] b,
  input  dr_t        cin,
  input  logic       ki,
  output qr_t  [1:0] f,
  output dr_t        cout,
  output logic       ko
);

  qr_t [1:0] y;
  for (genvar d = 0; d < 2; d++) begin : g_inv
    for (genvar r = 0; r < 4; r++) begin : g_rail
      assign y[d][r] = SUB ? b[d][3-r] : b[d][r];
    end
  end

  // Digit 0, then the register.
  qr_t  s0;
  dr_t  c1;
  ncl_qr_adder_digit u_d0 (.x(a[0]), .y(y[0]), .ci(cin), .s(s0), .co(c1));

  qr_t  s0_q, a1_q, y1_q;
  dr_t  c1_q;
  logic [3:0] r_ko;
  ncl_meag_reg #(.N(4)) u_rs (.rst(rst), .ki(ki), .m(s0),   .q(s0_q), .ko(r_ko[0]));
  ncl_meag_reg #(.N(4)) u_ra (.rst(rst), .ki(ki), .m(a[1]), .q(a1_q), .ko(r_ko[1]));
  ncl_meag_reg #(.N(4)) u_ry (.rst(rst), .ki(ki), .m(y[1]), .q(y1_q), .ko(r_ko[2]));
  ncl_dr_reg #(.W(1)) u_rc (.rst(rst), .ki(ki), .d(c1), .q(c1_q), .ko(r_ko[3]));
  ncl_comp #(.N(4)) u_cp (.ko_in(r_ko), .ko(ko));

  // Digit 1.
  ncl_qr_adder_digit u_d1 (.x(a1_q), .y(y1_q), .ci(c1_q), .s(f[1]), .co(cout));
  assign f[0] = s0_q;

endmodule
