// ncl_alu_dr: 4-bit, 8-operation dual-rail NULL Convention Logic ALU
// (non-pipelined).
//
// Operation (S = S2 S1 S0): 0 A|B, 1 A&B, 2 A^B, 3 ~A, 4 shift right with Cin
// entering at F3 (Cout = A0), 5 shift left with Cin entering at F0 (Cout = A3),
// 6 A-B-1+Bin (Bout), 7 A+B+Cin (Cout). Cout is 0 for operations 0-3.
//
// Structure (EMBED=0): A, B and Cin are held in a 9-bit dual-rail register,
// S in a 3-bit one; one completion component over both gives ko. S is turned
// into an 8-rail one-hot select (TH33 gates), a demultiplexer hands the
// operands to the selected function only, and the eight functions (input-
// complete OR/AND/XOR, renaming-only NOT/SHR/SHL, ripple subtractor and
// adder) feed two OR-type multiplexers, one for F (8 sources) and one for the
// carry (4 sources). The carry logic yields Cout = 0 for operations 0-3 and
// waits for Cin there. A 5-bit output register takes ki from the consumer;
// its completion is the request ki of the two input registers.
//
// EMBED=1 is the version with embedded registration: the select conversion
// becomes the S input register (TH44 gates with ki), and the F multiplexer
// and carry logic become the output register, so the separate 3-bit and
// 5-bit registers disappear. S2=0 (operations 0-3) is then recovered for the
// carry logic as the OR of select rails 0-3; that choice is this design's.
//
// Handshake (four-phase, DATA/NULL): ko high requests DATA on the inputs, ko
// low requests NULL. ki high lets DATA into the output, ki low lets NULL in.
// rst puts every register to NULL. There is no clock; the DATA-to-DATA cycle
// time depends on gate delays and on the operands.
//
// Combinational loops and latches in this module are intended: every NCL gate
// holds its output (hysteresis), and the ko/ki handshake closes a loop
// between the register stages.
module ncl_alu_dr
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b0
) (
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

  // Input stage.
  logic       ki_in;        // request for the input stage (output completion)
  dr_t  [8:0] in_q;
  logic [8:0] in_ko;
  dr_t  [3:0] ra, rb;
  dr_t        rcin;
  logic [7:0] sel;
  logic       s2_0;

  ncl_dr_reg #(.W(9)) u_in_reg (
    .rst(rst), .ki(ki_in), .d({cin, b, a}), .q(in_q), .ko(in_ko)
  );
  assign ra   = in_q[3:0];
  assign rb   = in_q[7:4];
  assign rcin = in_q[8];

  if (EMBED) begin : g_sel_embedded
    logic sel_ko;
    ncl_meag_conv #(.EMBED(1'b1)) u_meag (
      .rst(rst), .ki(ki_in), .s(s), .sel(sel), .ko(sel_ko)
    );
    ncl_comp #(.N(10)) u_in_comp (.ko_in({sel_ko, in_ko}), .ko(ko));
    ncl_th #(.N(4), .M(1)) u_s2_0 (.rst(1'b0), .in(sel[3:0]), .z(s2_0));
  end else begin : g_sel_reg
    dr_t  [2:0] s_q;
    logic [2:0] s_ko;
    logic       unused_meag_ko;
    ncl_dr_reg #(.W(3)) u_s_reg (.rst(rst), .ki(ki_in), .d(s), .q(s_q), .ko(s_ko));
    ncl_meag_conv #(.EMBED(1'b0)) u_meag (
      .rst(1'b0), .ki(1'b0), .s(s_q), .sel(sel), .ko(unused_meag_ko)
    );
    ncl_comp #(.N(12)) u_in_comp (.ko_in({s_ko, in_ko}), .ko(ko));
    assign s2_0 = s_q[2].r0;
  end

  // Demultiplexer and functions.
  dr_t [3:0] fa [8];
  dr_t [3:0] fb [8];
  dr_t       fcin [8];
  dr_t [3:0] res [8];
  dr_t       cres [4];

  ncl_demux #(.PASS_B_ALL(1'b0)) u_demux (
    .sel(sel), .a(ra), .b(rb), .cin(rcin), .fa(fa), .fb(fb), .fcin(fcin)
  );

  ncl_bitwise #(.OP(OP_OR))  u_or  (.a(fa[OP_OR]),  .b(fb[OP_OR]),  .f(res[OP_OR]));
  ncl_bitwise #(.OP(OP_AND)) u_and (.a(fa[OP_AND]), .b(fb[OP_AND]), .f(res[OP_AND]));
  ncl_bitwise #(.OP(OP_XOR)) u_xor (.a(fa[OP_XOR]), .b(fb[OP_XOR]), .f(res[OP_XOR]));

  // NOT, SHR and SHL are pure renaming of rails.
  for (genvar i = 0; i < 4; i++) begin : g_not
    assign res[OP_NOT][i] = dr_t'{r1: fa[OP_NOT][i].r0, r0: fa[OP_NOT][i].r1};
  end
  assign res[OP_SHR] = {fcin[OP_SHR], fa[OP_SHR][3:1]};
  assign cres[0]     = fa[OP_SHR][0];
  assign res[OP_SHL] = {fa[OP_SHL][2:0], fcin[OP_SHL]};
  assign cres[1]     = fa[OP_SHL][3];

  ncl_ripple_adder #(.W(4), .SUB(1'b1)) u_sub (
    .a(fa[OP_SUB]), .b(fb[OP_SUB]), .cin(fcin[OP_SUB]), .f(res[OP_SUB]), .cout(cres[2])
  );
  ncl_ripple_adder #(.W(4), .SUB(1'b0)) u_add (
    .a(fa[OP_ADD]), .b(fb[OP_ADD]), .cin(fcin[OP_ADD]), .f(res[OP_ADD]), .cout(cres[3])
  );

  // Multiplexers, carry logic and output stage.
  dr_t  [0:0] cmux;
  dr_t        ci;
  dr_t  [0:0] cres_v [4];
  logic [0:0] unused_cmux_ko;

  for (genvar n = 0; n < 4; n++) begin : g_cres
    assign cres_v[n] = cres[n];
  end

  ncl_mux #(.N(4), .W(1), .EMBED(1'b0)) u_cmux (
    .rst(1'b0), .ki(1'b0), .src(cres_v), .f(cmux), .ko(unused_cmux_ko)
  );
  assign ci = cmux[0];

  if (EMBED) begin : g_out_embedded
    logic [3:0] f_ko;
    logic       c_ko;
    ncl_mux #(.N(8), .W(4), .EMBED(1'b1)) u_fmux (
      .rst(rst), .ki(ki), .src(res), .f(f), .ko(f_ko)
    );
    ncl_carry_logic #(.EMBED(1'b1)) u_carry (
      .rst(rst), .ki(ki), .ci(ci), .cin(rcin), .s2_0(s2_0), .co(cout), .ko(c_ko)
    );
    ncl_comp #(.N(5)) u_out_comp (.ko_in({c_ko, f_ko}), .ko(ki_in));
  end else begin : g_out_reg
    dr_t  [3:0] fm;
    dr_t        co;
    dr_t  [4:0] out_q;
    logic [4:0] out_ko;
    logic [3:0] unused_fmux_ko;
    logic       unused_carry_ko;
    ncl_mux #(.N(8), .W(4), .EMBED(1'b0)) u_fmux (
      .rst(1'b0), .ki(1'b0), .src(res), .f(fm), .ko(unused_fmux_ko)
    );
    ncl_carry_logic #(.EMBED(1'b0)) u_carry (
      .rst(1'b0), .ki(1'b0), .ci(ci), .cin(rcin), .s2_0(s2_0), .co(co), .ko(unused_carry_ko)
    );
    ncl_dr_reg #(.W(5)) u_out_reg (
      .rst(rst), .ki(ki), .d({co, fm}), .q(out_q), .ko(out_ko)
    );
    assign f    = out_q[3:0];
    assign cout = out_q[4];
    ncl_comp #(.N(5)) u_out_comp (.ko_in(out_ko), .ko(ki_in));
  end

endmodule
