// ncl_alu_drp: pipelined 4-bit, 8-operation dual-rail NCL ALU.
//
// Same interface and function table as ncl_alu_dr, but with register stages
// inside so that several operations can be in flight:
//   stage 1  9-bit register (A, B, Cin) and the select conversion as an
//            embedded register (TH44 gates); ko is their joint completion.
//   stage 2  demultiplexer register (TH33 gates with one request per
//            function) passing A and B to all eight functions and Cin to
//            functions 4-7; in parallel the Carry MEAG register, which
//            registers the select MEAG and waits for Cin on rails 0-3.
//   stage 3  the functions: input-complete OR/AND/XOR, NOT/SHR/SHL that
//            absorb B themselves (TH23 gates), and a subtractor and adder
//            with two internal registers (full adders 0-1 | 2 | 3).
//            Alongside, the select MEAG passes two MEAG registers, so that
//            it stays aligned with the adder's extra stages.
//   stage 4  one select register per function (4 bits for 0-3, 5 for 4-7)
//            gated by the function's MEAG rail (TH33 gates); their per-
//            function completions are the requests of the functions (or of
//            the demultiplexer register directly for functions 0-5).
//   stage 5  multiplexer register: OR of the select-register outputs with
//            the request ki; Cout=0 for operations 0-3 is formed from their
//            F0 bit. Its 5-bit completion is the request of stage 4.
// The stages fed by one-hot sets (demultiplexer register, select registers)
// use special completion (ncl_comp_special): any set complete means DATA,
// all sets NULL means NULL.
// Handshake, reset and the lack of a clock are as for ncl_alu_dr. Latches
// and combinational loops are intended (NCL hysteresis, handshake loops).
module ncl_alu_drp
  import ncl_pkg::*;
(
  input  logic       rst,
  input  dr_t  [3:0] a,
  input  dr_t  [3:0] b,
  input  dr_t        cin,
  input  dr_t  [2:0] s,
  input  logic       ki,
  output dr_t  [3:0] f,
  output dr_t        cout,
  output logic       ko
);

  // Stage 1.
  logic       ki_s1;
  dr_t  [8:0] in_q;
  logic [8:0] in_ko;
  logic [7:0] sel;
  logic       sel_ko;

  ncl_dr_reg #(.W(9)) u_in_reg (.rst(rst), .ki(ki_s1), .d({cin, b, a}), .q(in_q), .ko(in_ko));
  ncl_meag_conv #(.EMBED(1'b1)) u_meag (.rst(rst), .ki(ki_s1), .s(s), .sel(sel), .ko(sel_ko));
  ncl_comp #(.N(10)) u_in_comp (.ko_in({sel_ko, in_ko}), .ko(ko));

  // Stage 2.
  dr_t  [3:0] fa   [8];
  dr_t  [3:0] fb   [8];
  dr_t        fcin [8];
  logic [7:0] ki_fn;
  logic [7:0] dmx_ko_set;
  logic [7:0] m1, m2, m3;
  logic       cm_ko, m1_ko, m2_ko;

  ncl_demux_reg u_demux (
    .rst(rst), .sel(sel), .a(in_q[3:0]), .b(in_q[7:4]), .cin(in_q[8]), .ki(ki_fn),
    .fa(fa), .fb(fb), .fcin(fcin), .ko_set(dmx_ko_set)
  );
  ncl_carry_meag_reg u_cmeag (
    .rst(rst), .ki(m1_ko), .sel(sel), .cin(in_q[8]), .m(m1), .ko(cm_ko)
  );
  ncl_comp_special #(.K(8), .E(1)) u_s1_comp (.ack(dmx_ko_set), .extra(cm_ko), .ko(ki_s1));

  // Stage 3: functions and the MEAG pipeline.
  dr_t [3:0] res  [8];
  dr_t       cres [4];
  logic      sel_ack_all;
  logic [7:0] sel_ack;

  ncl_bitwise #(.OP(OP_OR))  u_or  (.a(fa[OP_OR]),  .b(fb[OP_OR]),  .f(res[OP_OR]));
  ncl_bitwise #(.OP(OP_AND)) u_and (.a(fa[OP_AND]), .b(fb[OP_AND]), .f(res[OP_AND]));
  ncl_bitwise #(.OP(OP_XOR)) u_xor (.a(fa[OP_XOR]), .b(fb[OP_XOR]), .f(res[OP_XOR]));

  dr_t unused_not_cout;
  ncl_unary_bc #(.OP(OP_NOT)) u_not (
    .a(fa[OP_NOT]), .b(fb[OP_NOT]), .cin(fcin[OP_NOT]), .f(res[OP_NOT]), .cout(unused_not_cout)
  );
  ncl_unary_bc #(.OP(OP_SHR)) u_shr (
    .a(fa[OP_SHR]), .b(fb[OP_SHR]), .cin(fcin[OP_SHR]), .f(res[OP_SHR]), .cout(cres[0])
  );
  ncl_unary_bc #(.OP(OP_SHL)) u_shl (
    .a(fa[OP_SHL]), .b(fb[OP_SHL]), .cin(fcin[OP_SHL]), .f(res[OP_SHL]), .cout(cres[1])
  );
  ncl_pipe_adder #(.SUB(1'b1)) u_sub (
    .rst(rst), .a(fa[OP_SUB]), .b(fb[OP_SUB]), .cin(fcin[OP_SUB]), .ki(sel_ack[OP_SUB]),
    .f(res[OP_SUB]), .cout(cres[2]), .ko(ki_fn[OP_SUB])
  );
  ncl_pipe_adder #(.SUB(1'b0)) u_add (
    .rst(rst), .a(fa[OP_ADD]), .b(fb[OP_ADD]), .cin(fcin[OP_ADD]), .ki(sel_ack[OP_ADD]),
    .f(res[OP_ADD]), .cout(cres[3]), .ko(ki_fn[OP_ADD])
  );

  ncl_meag_reg #(.N(8)) u_m2 (.rst(rst), .ki(m2_ko), .m(m1), .q(m2), .ko(m1_ko));
  ncl_meag_reg #(.N(8)) u_m3 (.rst(rst), .ki(sel_ack_all), .m(m2), .q(m3), .ko(m2_ko));

  // Stage 4: select registers.
  logic       ki_s4;
  dr_t  [3:0] sq  [8];
  dr_t        scq [4];

  for (genvar k = 0; k < 8; k++) begin : g_sel
    if (k < 4) begin : g_w4
      logic [3:0] sko;
      ncl_sel_reg #(.W(4)) u_sr (
        .rst(rst), .ki(ki_s4), .m(m3[k]), .d(res[k]), .q(sq[k]), .ko(sko)
      );
      ncl_comp #(.N(4)) u_cp (.ko_in(sko), .ko(sel_ack[k]));
    end else begin : g_w5
      logic [4:0] sko;
      dr_t  [4:0] q5;
      ncl_sel_reg #(.W(5)) u_sr (
        .rst(rst), .ki(ki_s4), .m(m3[k]), .d({cres[k-4], res[k]}), .q(q5), .ko(sko)
      );
      assign sq[k]    = q5[3:0];
      assign scq[k-4] = q5[4];
      ncl_comp #(.N(5)) u_cp (.ko_in(sko), .ko(sel_ack[k]));
    end
    if (k < 6) begin : g_req
      assign ki_fn[k] = sel_ack[k];
    end
  end

  ncl_comp_special #(.K(8), .E(0)) u_s4_comp (.ack(sel_ack), .extra(1'b0), .ko(sel_ack_all));

  // Stage 5: multiplexer register.
  logic [4:0] out_ko;
  ncl_mux_reg u_mux (.rst(rst), .ki(ki), .fk(sq), .ck(scq), .f(f), .cout(cout), .ko(out_ko));
  ncl_comp #(.N(5)) u_out_comp (.ko_in(out_ko), .ko(ki_s4));

endmodule
