// ncl_pipe_adder: 4-bit dual-rail ripple adder or subtractor (SUB=1) with two
// embedded pipeline registers, for the pipelined ALU.
//
// Stage 1: full adders 0 and 1. Register R1 holds S0, S1, the carry into bit
// 2 and the untouched operand bits A2, A3, B2, B3 (7 dual-rail bits).
// Stage 2: full adder 2. Register R2 holds S0..S2, the carry into bit 3, A3,
// B3 (6 bits). Stage 3: full adder 3 drives the outputs directly; the next
// register (the select register of the ALU) closes the stage.
// ko is the completion of R1, the request for new operands; ki is the request
// from the register after the adder. Each register's request is the
// full-word completion of the register after it. The subtractor inverts B by
// swapping its rails and computes A + ~B + Bin, so cout is Bout.
module ncl_pipe_adder
  import ncl_pkg::*;
#(
  parameter bit SUB = 1'b0
) (
  input  logic      rst,
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  input  dr_t       cin,
  input  logic      ki,
  output dr_t [3:0] f,
  output dr_t       cout,
  output logic      ko
);

  dr_t [3:0] bi;
  for (genvar i = 0; i < 4; i++) begin : g_inv
    assign bi[i] = SUB ? dr_t'{r1: b[i].r0, r0: b[i].r1} : b[i];
  end

  // Stage 1.
  dr_t s0, s1, c1, c2;
  ncl_full_adder u_fa0 (.x(a[0]), .y(bi[0]), .ci(cin), .s(s0), .co(c1));
  ncl_full_adder u_fa1 (.x(a[1]), .y(bi[1]), .ci(c1), .s(s1), .co(c2));

  dr_t  [6:0] r1_q;
  logic [6:0] r1_ko;
  logic       r1_ki;
  ncl_dr_reg #(.W(7)) u_r1 (
    .rst(rst), .ki(r1_ki), .d({bi[3], bi[2], a[3], a[2], c2, s1, s0}), .q(r1_q), .ko(r1_ko)
  );
  ncl_comp #(.N(7)) u_r1_cp (.ko_in(r1_ko), .ko(ko));

  // Stage 2.
  dr_t s2, c3;
  ncl_full_adder u_fa2 (.x(r1_q[3]), .y(r1_q[5]), .ci(r1_q[2]), .s(s2), .co(c3));

  dr_t  [5:0] r2_q;
  logic [5:0] r2_ko;
  ncl_dr_reg #(.W(6)) u_r2 (
    .rst(rst), .ki(ki), .d({r1_q[6], r1_q[4], c3, s2, r1_q[1], r1_q[0]}), .q(r2_q), .ko(r2_ko)
  );
  ncl_comp #(.N(6)) u_r2_cp (.ko_in(r2_ko), .ko(r1_ki));

  // Stage 3.
  dr_t s3;
  ncl_full_adder u_fa3 (.x(r2_q[4]), .y(r2_q[5]), .ci(r2_q[3]), .s(s3), .co(cout));
  assign f = {s3, r2_q[2], r2_q[1], r2_q[0]};

endmodule
